// shift_adder -- the weighting adder that closes the general weight-based
// checker.
//
// Partition j of the general checker counts the outputs whose weight has
// binary bit j set.  Weighting that count by 2^j is a left shift by j, and
// the sum of the shifted counts is the weighted sum of the outputs that are 1:
//   sum = counts[0] + 2*counts[1] + 4*counts[2] + ...
// The result is truncated to SW bits, which the caller sizes to hold the
// largest possible sum (or to the modulus it checks against).
//
// Interface: counts[NPART][CW] in, sum[SW] out.  Combinational.
module shift_adder #(
  parameter int unsigned NPART = 3,
  parameter int unsigned CW    = 6,
  parameter int unsigned SW    = 7
) (
  input  logic [NPART-1:0][CW-1:0] counts,
  output logic [SW-1:0]            sum
);

  localparam int unsigned AW = CW + NPART;   // wide enough for the full sum

  logic [AW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int unsigned j = 0; j < NPART; j++)
      acc = acc + (AW'(counts[j]) << j);
  end

  assign sum = SW'(acc);

endmodule
