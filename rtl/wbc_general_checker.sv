// wbc_general_checker -- totally self-checking checker for a weight-based
// code, built only from Berger-checker parts.
//
// The weighted sum of the outputs that are 1 is reduced to counting ones.
// Write every weight in binary; partition j holds the outputs whose weight
// has bit j set, so an output of weight 3 sits in partitions 0 and 1 and an
// output of weight 2 only in partition 1.  One ones_counter per partition
// gives count_j, and shift_adder forms sum = sum_j count_j * 2^j, which is
// the sum of the weights of the outputs that are 1.  That sum is compared
// bit by bit with the received check bits: pair i is (sum[i], ~chk[i]),
// valid exactly when the bits agree, and a two_rail_checker tree folds the
// pairs into the single indication pair `ind`.
//
// The partitioning, the per-partition ones counting and the shift-and-add
// follow the document.  The comparison stage (inverted check bits into a
// two-rail tree, as in the classical Berger checker) and the cyclic weight
// assignment (output i gets WEIGHT_SET[i mod |set|]) are this design's
// choices.  MOD_BITS > 0 selects the reduced variant whose check symbol is
// the weighted sum modulo 2^MOD_BITS; 0 checks the full sum.
//
// Interface: info[N_OUT] are the monitored outputs, chk[R] the predicted
// check bits; ind is (1,0) or (0,1) for a code word and (0,0) or (1,1)
// otherwise; wsum is the full weighted sum, for observation.  Combinational.
//
// Defaults: 32 outputs with the weight set {2,3,4}, the configuration chosen
// for the 32-output benchmark C499 (7 check bits).
module wbc_general_checker import wbc_pkg::*; #(
  parameter  int unsigned N_OUT      = 32,
  parameter  wset_t       WEIGHT_SET = weight_set(2, 3, 4),
  parameter  int unsigned MOD_BITS   = 0,
  localparam int unsigned SUM_BITS   = check_bits(N_OUT, WEIGHT_SET),
  localparam int unsigned R          = (MOD_BITS == 0 || MOD_BITS >= SUM_BITS)
                                       ? SUM_BITS : MOD_BITS
) (
  input  logic [N_OUT-1:0]    info,
  input  logic [R-1:0]        chk,
  output logic [SUM_BITS-1:0] wsum,
  output tr_pair_t            ind
);

  localparam int unsigned NP = n_partitions(WEIGHT_SET);
  localparam int unsigned CW = $clog2(N_OUT + 1);

  initial begin
    assert (set_size(WEIGHT_SET) > 0)
      else $fatal(1, "weight set must hold at least one non-zero weight");
  end

  logic [NP-1:0][CW-1:0] counts;

  for (genvar j = 0; j < NP; j++) begin : g_part
    localparam int unsigned M = part_members(N_OUT, WEIGHT_SET, j);
    if (M > 0) begin : g_used
      localparam int unsigned MW = $clog2(M + 1);
      logic [M-1:0]  grp;
      logic [MW-1:0] cnt;
      for (genvar m = 0; m < M; m++) begin : g_member
        assign grp[m] = info[member_bit(N_OUT, WEIGHT_SET, j, m)];
      end
      ones_counter #(.N(M)) u_count (.bits(grp), .count(cnt));
      assign counts[j] = CW'(cnt);
    end else begin : g_empty
      assign counts[j] = '0;
    end
  end

  shift_adder #(.NPART(NP), .CW(CW), .SW(SUM_BITS)) u_add (
    .counts (counts),
    .sum    (wsum)
  );

  tr_pair_t [R-1:0] pairs;

  for (genvar i = 0; i < R; i++) begin : g_pair
    assign pairs[i].t = wsum[i];
    assign pairs[i].f = ~chk[i];
  end

  two_rail_checker #(.N(R)) u_trc (
    .in  (pairs),
    .out (ind)
  );

endmodule
