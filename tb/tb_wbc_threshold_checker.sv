// tb_wbc_threshold_checker -- self-checking test of the threshold checker.
//
// The default instance (32 outputs, weights {2,3,4}) and a Berger instance
// (7 outputs, weight 1) get random output words with check bits in
// complemented form.  Each word is evaluated for one period of the
// evaluation signal (phase_i = 1, then 0) and the two outputs are compared
// with the document's rule: (0,1) for a code word, (1,1) when the outputs
// weigh more than the check bits say, (0,0) when they weigh less.  The
// expected weighted sum is recomputed here.
module tb_wbc_threshold_checker;
  import wbc_pkg::*;

  logic [31:0] infoA;
  logic [6:0]  chkA;
  logic        outA;
  logic [6:0]  infoB;
  logic [2:0]  chkB;
  logic        outB;
  logic        phase;

  int checks = 0;
  int failures = 0;
  int seen [3];   // 0: code word, 1: too heavy, 2: too light

  wbc_threshold_checker uA (.info(infoA), .chk_c(chkA), .phase_i(phase), .out(outA));
  wbc_threshold_checker #(.N_OUT(7), .WEIGHT_SET(weight_set(1))) uB (
    .info(infoB), .chk_c(chkB), .phase_i(phase), .out(outB));

  function automatic int sumA(logic [31:0] v);
    int s = 0;
    for (int i = 0; i < 32; i++)
      if (v[i]) s += (i % 3 == 0) ? 2 : (i % 3 == 1) ? 3 : 4;
    return s;
  endfunction

  function automatic int sumB(logic [6:0] v);
    int s = 0;
    for (int i = 0; i < 7; i++) if (v[i]) s++;
    return s;
  endfunction

  // One period of I; claimed is the sum the check bits stand for.
  task automatic period(bit is_a, int actual, int claimed);
    logic o1, o0;
    logic [1:0] exp;
    phase = 1'b1;
    #1;
    o1 = is_a ? outA : outB;
    phase = 1'b0;
    #1;
    o0 = is_a ? outA : outB;
    exp = (actual == claimed) ? 2'b01 : (actual > claimed) ? 2'b11 : 2'b00;
    checks++;
    if ({o1, o0} != exp) begin
      failures++;
      $display("FAIL %s: actual=%0d claimed=%0d out=%b%b expected %b",
               is_a ? "A" : "B", actual, claimed, o1, o0, exp);
    end
    if (actual == claimed) seen[0]++;
    else if (actual > claimed) seen[1]++;
    else seen[2]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    phase = 0;
    infoA = '0; chkA = '1; infoB = '0; chkB = '1;
    seen = '{0, 0, 0};
    for (int n = 0; n < 1500; n++) begin
      infoA = $urandom;
      infoB = 7'($urandom);
      c = sumA(infoA);
      case (n % 3)
        1: c = c + 1 + ($urandom % 4);
        2: c = c - 1 - ($urandom % 4);
        default: ;
      endcase
      if (c < 0) c = 0;
      if (c > 127) c = 127;
      chkA = ~7'(c);
      period(1'b1, sumA(infoA), c);
      c = sumB(infoB);
      if (n % 3 == 1 && c < 7) c++;
      if (n % 3 == 2 && c > 0) c--;
      chkB = ~3'(c);
      period(1'b0, sumB(infoB), c);
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL: case %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
