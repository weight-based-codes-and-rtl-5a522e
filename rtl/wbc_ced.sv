// wbc_ced -- concurrent error detection unit for a multilevel circuit
// protected by a weight-based code.
//
// The monitored circuit is left untouched.  A separately synthesized
// predictor computes, from the same primary inputs, the check symbol: the
// sum of the weights of the outputs that should be 1.  This unit receives
// the actual outputs (info) and the predicted symbol (chk) and flags any
// mismatch.  Because predictor and circuit share no logic, a single fault
// corrupts either the outputs or the check bits, never both; an error in the
// check bits is always caught, and an error in the outputs escapes only if
// the weights of the bits that fell to 0 equal those of the bits that rose
// to 1.
//
// Both checker designs are instantiated side by side on the same code word:
//  * the general checker (ones counters per weight-bit partition, shift-add,
//    two-rail comparison) gives the two-rail indication gen_ind and the
//    convenience flag gen_err = (gen_ind is not a valid pair);
//  * the threshold checker gets the check bits inverted, since its pmos
//    side reads them in complemented form, and gives thr_out, which over one
//    period of phase_i (1 then 0) reads (0,1) for a code word.
// The monitored circuit and the predictor depend on the application and are
// outside this unit; their signals are its ports.
//
// Defaults: 32 outputs, weight set {2,3,4}, 7 check bits.  Combinational.
module wbc_ced import wbc_pkg::*; #(
  parameter  int unsigned N_OUT      = 32,
  parameter  wset_t       WEIGHT_SET = weight_set(2, 3, 4),
  localparam int unsigned R          = check_bits(N_OUT, WEIGHT_SET)
) (
  input  logic [N_OUT-1:0] info,
  input  logic [R-1:0]     chk,
  input  logic             phase_i,
  output logic [R-1:0]     wsum,
  output tr_pair_t         gen_ind,
  output logic             gen_err,
  output logic             thr_out
);

  wbc_general_checker #(.N_OUT(N_OUT), .WEIGHT_SET(WEIGHT_SET)) u_general (
    .info (info),
    .chk  (chk),
    .wsum (wsum),
    .ind  (gen_ind)
  );

  assign gen_err = ~tr_valid(gen_ind);

  wbc_threshold_checker #(.N_OUT(N_OUT), .WEIGHT_SET(WEIGHT_SET)) u_threshold (
    .info    (info),
    .chk_c   (~chk),
    .phase_i (phase_i),
    .out     (thr_out)
  );

endmodule
