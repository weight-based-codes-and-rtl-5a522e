// tb_shift_adder -- self-checking test of shift_adder.
//
// Default instance (3 partitions of 6-bit counts, 7-bit sum) and a wider one
// (4 partitions, 8-bit counts, 12-bit sum).  Each random set of counts is
// summed here as c0 + 2*c1 + 4*c2 (+ 8*c3) and compared, truncated to the
// sum width.  A time watchdog ends the run if it hangs.
module tb_shift_adder;

  logic [2:0][5:0] c3;
  logic [6:0]      s3;
  logic [3:0][7:0] c4;
  logic [11:0]     s4;

  int checks = 0;
  int failures = 0;

  shift_adder u3 (.counts(c3), .sum(s3));
  shift_adder #(.NPART(4), .CW(8), .SW(12)) u4 (.counts(c4), .sum(s4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e3, e4;
    for (int n = 0; n < 2000; n++) begin
      c3 = $urandom;
      c4 = $urandom;
      if (n == 0) begin c3 = '0; c4 = '0; end
      if (n == 1) begin c3 = {6'd10, 6'd11, 6'd0}; c4 = '1; end
      #1;
      e3 = (int'(c3[0]) + 2 * int'(c3[1]) + 4 * int'(c3[2])) % 128;
      e4 = (int'(c4[0]) + 2 * int'(c4[1]) + 4 * int'(c4[2]) + 8 * int'(c4[3])) % 4096;
      checks += 2;
      if (int'(s3) != e3) begin
        failures++;
        $display("FAIL 3-part: %p -> %0d, expected %0d", c3, s3, e3);
      end
      if (int'(s4) != e4) begin
        failures++;
        $display("FAIL 4-part: %p -> %0d, expected %0d", c4, s4, e4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
