// tb_wbc_ced -- end-to-end test of the concurrent error detection unit at
// its default size (32 outputs, weights {2,3,4}, 7 check bits).
//
// The test plays both the monitored circuit and its check-bit predictor:
// it draws a correct output word, computes its weighted sum as the
// predicted check symbol, then optionally injects one class of error, the
// way a single fault would show up, either on the outputs or on the check
// bits.  For every vector both checkers are evaluated (the threshold
// checker over one period of phase_i) and compared with the expected
// verdict, worked out here from an explicit weight table.  Each mechanism
// must occur at least once:
//   code word accepted, unidirectional output error caught, bidirectional
//   error of unequal weight caught, check-bit error caught, equal-weight
//   alias (first kind) passing, weight-sum alias 2+2-4 (second kind)
//   passing, threshold output (1,1) and (0,0).
module tb_wbc_ced;
  import wbc_pkg::*;

  logic [31:0] info;
  logic [6:0]  chk;
  logic        phase_i;
  logic [6:0]  wsum;
  tr_pair_t    gen_ind;
  logic        gen_err;
  logic        thr_out;

  int checks = 0;
  int failures = 0;

  typedef enum int {
    M_CODE, M_UNI, M_BIDIR, M_CHK, M_ALIAS1, M_ALIAS2, M_HEAVY, M_LIGHT, M_NUM
  } mech_e;
  int seen [M_NUM];
  string names [M_NUM] = '{"code word", "unidirectional", "bidirectional",
                           "check-bit error", "equal-weight alias",
                           "weight-sum alias", "threshold (1,1)", "threshold (0,0)"};

  wbc_ced dut (
    .info    (info),
    .chk     (chk),
    .phase_i (phase_i),
    .wsum    (wsum),
    .gen_ind (gen_ind),
    .gen_err (gen_err),
    .thr_out (thr_out)
  );

  function automatic int w(int i);
    return (i % 3 == 0) ? 2 : (i % 3 == 1) ? 3 : 4;
  endfunction

  function automatic int ref_sum(logic [31:0] v);
    int s = 0;
    for (int i = 0; i < 32; i++) if (v[i]) s += w(i);
    return s;
  endfunction

  // Applies one (outputs, check bits) pair and checks both checkers.
  task automatic apply(logic [31:0] v, int c, mech_e m, bit expect_flag);
    logic o1, o0;
    int   s;
    s = ref_sum(v);
    info = v;
    chk  = 7'(c);
    phase_i = 1'b1;
    #1;
    o1 = thr_out;
    checks++;
    if (gen_err != expect_flag || gen_err == tr_valid(gen_ind)) begin
      failures++;
      $display("FAIL %s: general checker err=%0b ind=%b%b, expected err=%0b",
               names[m], gen_err, gen_ind.t, gen_ind.f, expect_flag);
    end
    checks++;
    if (int'(wsum) != s) begin
      failures++;
      $display("FAIL %s: wsum=%0d expected %0d", names[m], wsum, s);
    end
    phase_i = 1'b0;
    #1;
    o0 = thr_out;
    checks++;
    if ((s == c) ? ({o1, o0} != 2'b01) : (s > c) ? ({o1, o0} != 2'b11)
                                               : ({o1, o0} != 2'b00)) begin
      failures++;
      $display("FAIL %s: threshold out=%b%b, sum=%0d check=%0d", names[m], o1, o0, s, c);
    end
    if (s > c) seen[M_HEAVY]++;
    if (s < c) seen[M_LIGHT]++;
    seen[m]++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, e, up, dn;
    int i, j, k;
    for (int m = 0; m < M_NUM; m++) seen[m] = 0;
    phase_i = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      v = $urandom;
      case (n % 6)
        0: apply(v, ref_sum(v), M_CODE, 1'b0);
        1: begin  // unidirectional error, random direction
          e = $urandom;
          if (e == 0) e = 32'h1;
          if ($urandom % 2 != 0) apply(v | e, ref_sum(v), (v | e) == v ? M_CODE : M_UNI, (v | e) != v);
          else              apply(v & ~e, ref_sum(v), (v & ~e) == v ? M_CODE : M_UNI, (v & ~e) != v);
        end
        2: begin  // one bit of weight 2 falls, one of weight 3 rises
          i = 3 * ($urandom % 11);        // weight 2
          j = 3 * ($urandom % 11) + 1;    // weight 3
          v[i] = 1'b1; v[j] = 1'b0;
          e = v; e[i] = 1'b0; e[j] = 1'b1;
          apply(e, ref_sum(v), M_BIDIR, 1'b1);
        end
        3: begin  // check bits hit instead of outputs
          apply(v, ref_sum(v) ^ (1 << ($urandom % 7)), M_CHK, 1'b1);
        end
        4: begin  // two weight-2 outputs move in opposite directions
          i = 3 * ($urandom % 11);
          j = 3 * (($urandom % 10 + 1 + i / 3) % 11);
          v[i] = 1'b1; v[j] = 1'b0;
          e = v; e[i] = 1'b0; e[j] = 1'b1;
          apply(e, ref_sum(v), M_ALIAS1, 1'b0);
        end
        default: begin  // two weight-2 outputs rise, one weight-4 output falls
          i = 0; j = 3; k = 3 * ($urandom % 10) + 2;
          v[i] = 1'b0; v[j] = 1'b0; v[k] = 1'b1;
          e = v; e[i] = 1'b1; e[j] = 1'b1; e[k] = 1'b0;
          apply(e, ref_sum(v), M_ALIAS2, 1'b0);
        end
      endcase
    end
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("mechanism %-20s seen %0d times", names[m], seen[m]);
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL: mechanism '%s' never happened", names[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
