// ones_counter -- counts the bits that are 1 in an N-bit group.
//
// This is the ones-counting stage of a Berger code checker; the general
// weight-based checker runs one of these per weight-bit partition.  Any ones
// counter will do there, so this one is the simplest: an adder chain that the
// synthesis tool is free to rebalance into a tree.
//
// Interface: bits[N-1:0] in, count[CW-1:0] out with CW = clog2(N+1), so that
// an all-ones group still fits.  Purely combinational, no clock.
module ones_counter #(
  parameter  int unsigned N  = 32,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits,
  output logic [CW-1:0] count
);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++)
      count = count + CW'(bits[i]);
  end

endmodule
