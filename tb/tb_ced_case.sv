// tb_ced_case -- one weight-based code configuration run through wbc_ced;
// a building block of tb_table5_workloads, not a test on its own.
//
// Checks that the unit needs EXP_R check bits and that a Berger checker for
// the same outputs needs EXP_BERGER_R, then sends NVEC random code words,
// each followed by a unidirectional output error and a check-bit error.
// The weighted sum is recomputed here from the weight set, used
// cyclically.  It starts on `start` and raises `done` with its counts.
module tb_ced_case import wbc_pkg::*; #(
  parameter int unsigned N_OUT        = 7,
  parameter wset_t       WEIGHT_SET   = weight_set(3, 4, 5, 6),
  parameter int unsigned EXP_R        = 5,
  parameter int unsigned EXP_BERGER_R = 3,
  parameter int unsigned NVEC         = 200
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned R  = check_bits(N_OUT, WEIGHT_SET);
  localparam int unsigned RB = check_bits(N_OUT, weight_set(1));

  logic [N_OUT-1:0] info;
  logic [R-1:0]     chk;
  logic             phase_i;
  logic [R-1:0]     wsum;
  tr_pair_t         gen_ind;
  logic             gen_err;
  logic             thr_out;

  logic [N_OUT-1:0] binfo;
  logic [RB-1:0]    bchk;
  logic [RB-1:0]    bsum;
  tr_pair_t         bind_ind;

  wbc_ced #(.N_OUT(N_OUT), .WEIGHT_SET(WEIGHT_SET)) dut (
    .info(info), .chk(chk), .phase_i(phase_i), .wsum(wsum),
    .gen_ind(gen_ind), .gen_err(gen_err), .thr_out(thr_out));

  wbc_general_checker #(.N_OUT(N_OUT), .WEIGHT_SET(weight_set(1))) berger (
    .info(binfo), .chk(bchk), .wsum(bsum), .ind(bind_ind));

  function automatic int ref_sum(logic [N_OUT-1:0] v);
    int s, sz;
    sz = 0;
    while (sz < 8 && WEIGHT_SET[sz] != 0) sz++;
    s = 0;
    for (int i = 0; i < N_OUT; i++) if (v[i]) s += int'(WEIGHT_SET[i % sz]);
    return s;
  endfunction

  function automatic logic [N_OUT-1:0] rand_word();
    logic [N_OUT-1:0] v;
    for (int i = 0; i < N_OUT; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  task automatic apply(logic [N_OUT-1:0] v, int c, bit expect_flag);
    logic o1, o0;
    info = v;
    chk  = R'(c);
    binfo = v;
    bchk  = RB'($countones(v));
    phase_i = 1'b1;
    #1;
    o1 = thr_out;
    phase_i = 1'b0;
    #1;
    o0 = thr_out;
    checks += 3;
    if (gen_err != expect_flag) begin
      failures++;
      $display("FAIL N=%0d: general err=%0b expected %0b", N_OUT, gen_err, expect_flag);
    end
    if (({o1, o0} != 2'b01) != expect_flag) begin
      failures++;
      $display("FAIL N=%0d: threshold out=%b%b expected flag %0b", N_OUT, o1, o0, expect_flag);
    end
    if (!tr_valid(bind_ind)) begin
      failures++;
      $display("FAIL N=%0d: Berger checker rejected a code word", N_OUT);
    end
  endtask

  initial begin
    logic [N_OUT-1:0] v, e;
    done = 1'b0;
    checks = 0;
    failures = 0;
    info = '0; chk = '0; phase_i = 1'b0; binfo = '0; bchk = '0;
    wait (start);
    checks += 2;
    if (R != EXP_R) begin
      failures++;
      $display("FAIL N=%0d: %0d check bits, expected %0d", N_OUT, R, EXP_R);
    end
    if (RB != EXP_BERGER_R) begin
      failures++;
      $display("FAIL N=%0d: Berger needs %0d check bits, expected %0d", N_OUT, RB, EXP_BERGER_R);
    end
    apply('1, ref_sum('1), 1'b0);
    for (int n = 0; n < NVEC; n++) begin
      v = rand_word();
      apply(v, ref_sum(v), 1'b0);
      e = rand_word() & v;
      if (e == 0) e[0] = v[0];
      if (e != 0) apply(v & ~e, ref_sum(v), 1'b1);
      apply(v, ref_sum(v) ^ (1 << ($urandom % R)), 1'b1);
    end
    done = 1'b1;
  end

endmodule
