// tb_two_rail_checker -- exhaustive self-checking test of two_rail_checker.
//
// A 4-pair instance sees all 256 input combinations, and the default
// 7-pair and a 1-pair instance see random and all-valid inputs.  The output
// must be a valid pair exactly when every input pair is valid.  For all
// valid inputs the output must also be the XOR-parity-style function of the
// cell equations: out.t = 1 when an even number of input pairs carry (0,1).
module tb_two_rail_checker;
  import wbc_pkg::*;

  tr_pair_t [3:0] in4;
  tr_pair_t       out4;
  tr_pair_t [6:0] in7;
  tr_pair_t       out7;
  tr_pair_t [0:0] in1;
  tr_pair_t       out1;

  int checks = 0;
  int failures = 0;

  two_rail_checker #(.N(4)) u4 (.in(in4), .out(out4));
  two_rail_checker          u7 (.in(in7), .out(out7));
  two_rail_checker #(.N(1)) u1 (.in(in1), .out(out1));

  function automatic bit all_valid(logic [13:0] v, int n);
    for (int k = 0; k < n; k++) if (v[2*k+1] == v[2*k]) return 0;
    return 1;
  endfunction

  // For valid inputs: out.t is 1 when an even number of pairs are (0,1).
  function automatic bit expect_t(logic [13:0] v, int n);
    int z = 0;
    for (int k = 0; k < n; k++) if (v[2*k+1] == 1'b0) z++;
    return (z % 2) == 0;
  endfunction

  task automatic check(string tag, logic [13:0] v, int n, tr_pair_t o);
    bit ev;
    ev = all_valid(v, n);
    checks++;
    if ((o.t ^ o.f) != ev) begin
      failures++;
      $display("FAIL %s: in=%b out=%b%b expected valid=%0b", tag, v, o.t, o.f, ev);
    end
    if (ev) begin
      checks++;
      if (o.t != expect_t(v, n)) begin
        failures++;
        $display("FAIL %s: in=%b out.t=%b", tag, v, o.t);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] v;
    for (int a = 0; a < 256; a++) begin
      in4 = 8'(a);
      #1;
      check("n4", 14'(a), 4, out4);
    end
    for (int a = 0; a < 4; a++) begin
      in1 = 2'(a);
      #1;
      check("n1", 14'(a), 1, out1);
    end
    for (int n = 0; n < 1000; n++) begin
      v = 14'($urandom);
      if (n % 2 == 0)   // half the vectors all valid
        for (int k = 0; k < 7; k++) v[2*k] = ~v[2*k+1];
      in7 = v;
      #1;
      check("n7", v, 7, out7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
