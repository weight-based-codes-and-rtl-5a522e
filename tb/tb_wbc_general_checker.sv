// tb_wbc_general_checker -- self-checking test of the general weight-based
// code checker.
//
// Five instances:
//   A  default: 32 outputs, weights {2,3,4} cyclic, 7 check bits
//   B  Berger code: 7 outputs, every weight 1, 3 check bits
//   C  the {2,3} example: 10 outputs, odd outputs weigh 2, even ones 3
//   D  instance A's code checked modulo 8 (3 check bits)
//   E  12 outputs with weights {5,6}
// For each, random output words are sent with the correct check bits, with
// corrupted check bits, and with unidirectional errors on the outputs.  The
// expected weighted sum is recomputed here from an explicit weight table;
// the indication must be a valid two-rail pair exactly when that sum (mod
// 2^R) equals the check bits.  Aliasing cases named in the document are
// checked too: on E, six weight-5 outputs falling while five weight-6
// outputs rise is not detected, and on A, two weight-2 outputs moving in
// opposite directions is not detected, while a single-bit error always is.
module tb_wbc_general_checker;
  import wbc_pkg::*;

  localparam int NI = 5;
  localparam int N   [NI] = '{32, 7, 10, 32, 12};
  localparam int RB  [NI] = '{7, 3, 5, 3, 7};

  logic [31:0] info [NI];
  logic [6:0]  chk  [NI];
  tr_pair_t    ind  [NI];
  logic [6:0]  wsA, wsD;
  logic [2:0]  wsB;
  logic [4:0]  wsC;
  logic [6:0]  wsE;

  int checks = 0;
  int failures = 0;

  wbc_general_checker uA (.info(info[0]), .chk(chk[0]), .wsum(wsA), .ind(ind[0]));
  wbc_general_checker #(.N_OUT(7), .WEIGHT_SET(weight_set(1))) uB (
    .info(info[1][6:0]), .chk(chk[1][2:0]), .wsum(wsB), .ind(ind[1]));
  wbc_general_checker #(.N_OUT(10), .WEIGHT_SET(weight_set(2, 3))) uC (
    .info(info[2][9:0]), .chk(chk[2][4:0]), .wsum(wsC), .ind(ind[2]));
  wbc_general_checker #(.MOD_BITS(3)) uD (
    .info(info[3]), .chk(chk[3][2:0]), .wsum(wsD), .ind(ind[3]));
  wbc_general_checker #(.N_OUT(12), .WEIGHT_SET(weight_set(5, 6))) uE (
    .info(info[4][11:0]), .chk(chk[4][6:0]), .wsum(wsE), .ind(ind[4]));

  // F: positional code over 10 outputs, weights 1..10 (6 check bits).
  logic [9:0] infoF;
  logic [5:0] chkF;
  logic [5:0] wsF;
  tr_pair_t   indF;
  wbc_general_checker #(.N_OUT(10), .WEIGHT_SET(consecutive_weights(10))) uF (
    .info(infoF), .chk(chkF), .wsum(wsF), .ind(indF));

  function automatic int pos_sum(logic [31:0] v);
    int s = 0;
    for (int i = 0; i < 10; i++) if (v[i]) s += i + 1;
    return s;
  endfunction

  // Self-testing coverage of instance A's two-rail tree: each cell should
  // see all four valid input combinations under code words, which is what
  // lets normal operation expose a stuck cell.  The tree is heap-ordered
  // (cell k merges nodes 2k+1 and 2k+2, pair i is leaf node 6+i), so the
  // node values follow from the sum alone.
  localparam int NCELL = 6;               // 7 pairs -> 6 cells
  bit cell_seen [NCELL][4];

  task automatic cover_tree(int sum);
    logic [12:0] nt;                      // t rail of every node; f = ~t
    for (int i = 0; i < 7; i++) nt[6+i] = 1'((sum >> i) & 1);
    for (int k = NCELL - 1; k >= 0; k--) begin
      nt[k] = ~(nt[2*k+1] ^ nt[2*k+2]);
      cell_seen[k][{nt[2*k+1], nt[2*k+2]}] = 1'b1;
    end
  endtask

  function automatic int w(int id, int i);
    case (id)
      0, 3: return (i % 3 == 0) ? 2 : (i % 3 == 1) ? 3 : 4;
      1:    return 1;
      2:    return (i % 2 == 0) ? 2 : 3;
      default: return (i % 2 == 0) ? 5 : 6;
    endcase
  endfunction

  function automatic int ref_sum(int id, logic [31:0] v);
    int s = 0;
    for (int i = 0; i < N[id]; i++) if (v[i]) s += w(id, i);
    return s;
  endfunction

  function automatic logic [31:0] mask_n(int id);
    return (N[id] == 32) ? 32'hffff_ffff : ((32'd1 << N[id]) - 1);
  endfunction

  function automatic int wsum_of(int id);
    case (id)
      0: return int'(wsA);
      1: return int'(wsB);
      2: return int'(wsC);
      3: return int'(wsD);
      default: return int'(wsE);
    endcase
  endfunction

  // Applies a word and check bits to instance id and checks the indication
  // against the recomputed sum; returns 1 if the checker flagged an error.
  task automatic apply(int id, logic [31:0] v, int c, output bit flagged);
    int s, m;
    bit exp_ok;
    v = v & mask_n(id);
    m = 1 << RB[id];
    s = ref_sum(id, v);
    info[id] = v;
    chk[id]  = 7'(c % m);
    #1;
    exp_ok  = ((s % m) == (c % m));
    if (id == 0 && exp_ok) cover_tree(s);
    flagged = !(ind[id].t ^ ind[id].f);
    checks++;
    if (flagged == exp_ok) begin
      failures++;
      $display("FAIL inst %0d: info=%h chk=%0d sum=%0d ind=%b%b", id, v, c % m, s,
               ind[id].t, ind[id].f);
    end
    if (id != 3) begin
      checks++;
      if (wsum_of(id) != s) begin
        failures++;
        $display("FAIL inst %0d: wsum=%0d expected %0d", id, wsum_of(id), s);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fl;
    logic [31:0] v, e;
    int missed_uni;
    missed_uni = 0;
    for (int k = 0; k < NCELL; k++) cell_seen[k] = '{0, 0, 0, 0};
    for (int id = 0; id < NI; id++) begin info[id] = '0; chk[id] = '0; end
    for (int id = 0; id < NI; id++) begin
      apply(id, '0, 0, fl);
      apply(id, '1, ref_sum(id, mask_n(id)), fl);
      for (int n = 0; n < 400; n++) begin
        v = $urandom;
        // correct code word
        apply(id, v, ref_sum(id, v & mask_n(id)), fl);
        // corrupted check bits
        apply(id, v, ref_sum(id, v & mask_n(id)) + 1 + ($urandom % 5), fl);
        // single check bit flipped
        apply(id, v, ref_sum(id, v & mask_n(id)) ^ (1 << ($urandom % RB[id])), fl);
        // unidirectional 1->0 error on the outputs, check bits unchanged
        e = v & $urandom & mask_n(id);
        if (e != 0) begin
          apply(id, v & ~e, ref_sum(id, v & mask_n(id)), fl);
          if (!fl && id != 3) missed_uni++;
        end
        // single-bit error
        e = 32'd1 << ($urandom % N[id]);
        apply(id, v ^ e, ref_sum(id, v & mask_n(id)), fl);
        checks++;
        if (!fl) begin
          failures++;
          $display("FAIL inst %0d: single-bit error not flagged", id);
        end
      end
    end
    checks++;
    if (missed_uni != 0) begin
      failures++;
      $display("FAIL: %0d unidirectional errors escaped", missed_uni);
    end

    // Aliasing of the second kind on {5,6}: six weight-5 bits (even
    // positions) 1->0 and five weight-6 bits (odd positions) 0->1.
    v = 32'b0000_0101_0101_0101;          // bits 0,2,..,10 at 1 (weight 5 each)
    e = 32'b0000_1010_1010_1000;          // bits 3,5,7,9,11 rise (weight 6 each)
    apply(4, (v & ~32'h555) | e, ref_sum(4, v), fl);
    checks++;
    if (fl) begin failures++; $display("FAIL: {5,6} alias unexpectedly flagged"); end
    // Five weight-5 bits falling against five weight-6 bits rising is seen.
    apply(4, (v & ~32'h155) | e, ref_sum(4, v), fl);
    checks++;
    if (!fl) begin failures++; $display("FAIL: {5,6} 5+5 error not flagged"); end

    // Aliasing of the first kind on the default code: outputs 0 and 3 both
    // weigh 2; one falls while the other rises.
    apply(0, 32'h0000_0001, ref_sum(0, 32'h0000_0008), fl);
    checks++;
    if (fl) begin failures++; $display("FAIL: equal-weight alias unexpectedly flagged"); end
    // Outputs 0 (weight 2) and 1 (weight 3) in opposite directions: seen.
    apply(0, 32'h0000_0001, ref_sum(0, 32'h0000_0002), fl);
    checks++;
    if (!fl) begin failures++; $display("FAIL: 2-vs-3 error not flagged"); end

    // Sums of this code stop at 95, so pairs 5 and 6 (sum bits 5 and 6) are
    // never both 1 under a code word: cell 5 misses that one combination.
    for (int k = 0; k < NCELL; k++)
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (cell_seen[k][q] == (k == 5 && q == 3)) begin
          failures++;
          $display("FAIL: two-rail cell %0d input combination %0d coverage %0b",
                   k, q, cell_seen[k][q]);
        end
      end

    // Positional code (weights 1..10): every single and double error on the
    // outputs is detected, for every pair of positions and both directions.
    for (int a = 0; a < 10; a++) begin
      for (int b = 0; b < 10; b++) begin
        for (int d = 0; d < 4; d++) begin
          v = 32'($urandom) & 32'h3ff;
          v[a] = d[0];
          v[b] = d[1];
          e = v;
          e[a] = ~e[a];
          if (b != a) e[b] = ~e[b];
          infoF = 10'(e);
          chkF  = 6'(pos_sum(v));
          #1;
          checks++;
          if (indF.t ^ indF.f) begin
            failures++;
            $display("FAIL positional: error on bits %0d,%0d missed", a, b);
          end
        end
      end
    end
    // and its code words are accepted
    for (int n = 0; n < 200; n++) begin
      v = 32'($urandom) & 32'h3ff;
      infoF = 10'(v);
      chkF  = 6'(pos_sum(v));
      #1;
      checks++;
      if (!(indF.t ^ indF.f) || int'(wsF) != pos_sum(v)) begin
        failures++;
        $display("FAIL positional: code word %h rejected", v);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
