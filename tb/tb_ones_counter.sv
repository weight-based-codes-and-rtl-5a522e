// tb_ones_counter -- self-checking test of ones_counter.
//
// Two instances, the default 32-bit group and a 7-bit group, get corner
// patterns (all 0, all 1, walking one) and random words.  The expected count
// is recomputed here bit by bit.  A time watchdog ends the run if it hangs.
module tb_ones_counter;

  logic [31:0] bits32;
  logic [5:0]  cnt32;
  logic [6:0]  bits7;
  logic [2:0]  cnt7;

  int checks = 0;
  int failures = 0;

  ones_counter u32 (.bits(bits32), .count(cnt32));
  ones_counter #(.N(7)) u7 (.bits(bits7), .count(cnt7));

  function automatic int ref_count(logic [31:0] v, int n);
    int c = 0;
    for (int i = 0; i < n; i++) if (v[i]) c++;
    return c;
  endfunction

  task automatic apply(logic [31:0] v);
    bits32 = v;
    bits7  = v[6:0];
    #1;
    checks += 2;
    if (int'(cnt32) != ref_count(v, 32)) begin
      failures++;
      $display("FAIL 32-bit: %h -> %0d, expected %0d", v, cnt32, ref_count(v, 32));
    end
    if (int'(cnt7) != ref_count(v, 7)) begin
      failures++;
      $display("FAIL 7-bit: %h -> %0d, expected %0d", v[6:0], cnt7, ref_count(v, 7));
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
    apply('0);
    apply('1);
    for (int i = 0; i < 32; i++) apply(32'd1 << i);
    for (int i = 0; i < 2000; i++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
