// tb_table5_workloads -- the ten benchmark configurations of the weight-based
// code study, each run through the detection unit.
//
// For every benchmark the number of outputs and the chosen weight set give
// the check-bit count, which must match the published one, as must the
// Berger code's; each configuration then checks random code words and
// injected errors (see tb_ced_case).  The introduction's sizing example is
// included as well: 120 outputs need 7 Berger check bits, 40 need 6.
module tb_table5_workloads;
  import wbc_pkg::*;

  localparam int NC = 12;

  logic start;
  logic done  [NC];
  int   chks  [NC];
  int   fails [NC];

  // circuit    outputs  weight set          check bits (Berger)
  tb_ced_case #(7,   weight_set(3,4,5,6), 5, 3) c432  (start, done[0],  chks[0],  fails[0]);
  tb_ced_case #(32,  weight_set(2,3,4),   7, 6) c499  (start, done[1],  chks[1],  fails[1]);
  tb_ced_case #(26,  weight_set(1,2),     6, 5) c880  (start, done[2],  chks[2],  fails[2]);
  tb_ced_case #(32,  weight_set(1,2,3),   6, 6) c1355 (start, done[3],  chks[3],  fails[3]);
  tb_ced_case #(25,  weight_set(2,3,4,5), 7, 5) c1908 (start, done[4],  chks[4],  fails[4]);
  tb_ced_case #(140, weight_set(1,2),     8, 8) c2670 (start, done[5],  chks[5],  fails[5]);
  tb_ced_case #(22,  weight_set(3,4,5,6), 7, 5) c3540 (start, done[6],  chks[6],  fails[6]);
  tb_ced_case #(123, weight_set(2,3,4),   9, 7) c5315 (start, done[7],  chks[7],  fails[7]);
  tb_ced_case #(32,  weight_set(1,2),     6, 6) c6288 (start, done[8],  chks[8],  fails[8]);
  tb_ced_case #(108, weight_set(3,4,5),   9, 7) c7552 (start, done[9],  chks[9],  fails[9]);
  // introduction: one Berger code over 120 outputs against one over 40
  tb_ced_case #(120, weight_set(1),       7, 7) b120  (start, done[10], chks[10], fails[10]);
  tb_ced_case #(40,  weight_set(1),       6, 6) b40   (start, done[11], chks[11], fails[11]);

  int checks, failures;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all_done;
    checks = 0;
    failures = 0;
    start = 1'b0;
    #1 start = 1'b1;
    do begin
      #10;
      all_done = 1'b1;
      for (int k = 0; k < NC; k++) if (!done[k]) all_done = 1'b0;
    end while (!all_done);
    for (int k = 0; k < NC; k++) begin
      checks += chks[k];
      failures += fails[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
