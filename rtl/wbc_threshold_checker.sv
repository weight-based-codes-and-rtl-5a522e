// wbc_threshold_checker -- single-output checker for a weight-based code,
// modelled at the level of its switching function.
//
// The physical circuit is a ratioed aggregate-weight threshold gate.  Each
// monitored output drives an nmos transistor sized to that output's weight,
// so the pull-down strength is the weighted sum of the outputs that are 1.
// Each check-bit line C_i drives a pmos transistor sized 2^i; a pmos
// conducts when its gate is 0, so the pull-up strength is
// sum_i ~C_i * 2^i.  With check bits carried in complemented form (the
// Berger convention, C = ~weighted sum) the two strengths are equal for a
// code word.  The evaluation signal I adds one unit to the pull-up side
// while it is high, so over one period of I (high, then low) the output is
//   (0,1) for a code word,
//   (1,1) if the outputs weigh more than the check bits claim,
//   (0,0) if they weigh less.
// The nmos sizing by weight follows the document; the way I shifts the
// threshold by one unit and the phase order are this design's reading of
// the Berger checker it is derived from.  This RTL computes the same
// decision with an adder and a comparator; transistor sizing is out of
// scope.
//
// Interface: info[N_OUT] monitored outputs, chk_c[R] complemented check bits,
// phase_i the evaluation signal I, out the checker output.  Combinational.
module wbc_threshold_checker import wbc_pkg::*; #(
  parameter  int unsigned N_OUT      = 32,
  parameter  wset_t       WEIGHT_SET = weight_set(2, 3, 4),
  localparam int unsigned R          = check_bits(N_OUT, WEIGHT_SET)
) (
  input  logic [N_OUT-1:0] info,
  input  logic [R-1:0]     chk_c,
  input  logic             phase_i,
  output logic             out
);

  // Pull-down: aggregate weight of the conducting nmos transistors.  Each
  // output contributes its constant weight when it is 1.
  logic [N_OUT-1:0][R-1:0] term;
  for (genvar i = 0; i < N_OUT; i++) begin : g_nmos
    localparam int unsigned WI = weight_of(WEIGHT_SET, i);
    assign term[i] = info[i] ? R'(WI) : '0;
  end

  logic [R-1:0] n_weight;
  always_comb begin
    n_weight = '0;
    for (int unsigned i = 0; i < N_OUT; i++)
      n_weight = n_weight + term[i];
  end

  // Pull-up: conducting pmos transistors plus the unit added during I.
  logic [R:0] p_weight;
  assign p_weight = {1'b0, ~chk_c} + (R+1)'(phase_i);

  assign out = ({1'b0, n_weight} >= p_weight);

endmodule
