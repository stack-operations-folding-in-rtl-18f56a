// tb_folding_logic: the cascaded folding logic against the folding rule
// state machine.
//
// Every sequence of four instruction classes (6^4 = 1296) is applied to the
// default 4-foldable cascade; group size, folded type and each of the 2-,
// 3- and 4-foldable lines are compared with the state-machine walk. A
// 6-foldable instance is checked with random sequences to exercise the
// scalable cascade. The published 2-, 3- and 4-foldable pattern tables are
// also applied one by one and must fold completely.
module tb_folding_logic;
  import fold_pkg::*;
  import fold_ref_pkg::*;

  int checks = 0, failures = 0;

  poc_t       poc4 [4];
  logic [2:0] lines4;
  logic [2:0] cnt4;
  poc_t       gp4;

  poc_t       poc6 [6];
  logic [4:0] lines6;
  logic [2:0] cnt6;
  poc_t       gp6;

  folding_logic #(.N_FOLD(4)) dut4 (.poc(poc4), .k_foldable(lines4),
                                    .fold_count(cnt4), .group_poc(gp4));
  folding_logic #(.N_FOLD(6)) dut6 (.poc(poc6), .k_foldable(lines6),
                                    .fold_count(cnt6), .group_poc(gp6));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run4(kind_e k[4]);
    kind_e ks[] = new[4];
    int n; kind_e gk; logic [15:0] ln;
    for (int i = 0; i < 4; i++) begin ks[i] = k[i]; poc4[i] = kind_bits(k[i]); end
    #1;
    ref_fold(ks, 4, n, gk, ln);
    expect_eq($sformatf("count %p", k), int'(cnt4), n);
    expect_eq($sformatf("lines %p", k), int'(lines4), int'(ln[2:0]));
    expect_eq($sformatf("type %p", k), int'(gp4), int'(kind_bits(gk)));
  endtask

  // One row of the published pattern tables; unused slots are O_T.
  task automatic pattern(kind_e a, kind_e b, kind_e c = K_OT, kind_e d = K_OT, int len = 2);
    kind_e k[4] = '{a, b, c, d};
    for (int i = 0; i < 4; i++) poc4[i] = kind_bits(k[i]);
    #1;
    expect_eq($sformatf("pattern %p", k), int'(cnt4), len);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 1296; x++) begin
      kind_e k[4];
      automatic int v = x;
      for (int i = 0; i < 4; i++) begin k[i] = kind_e'(v % 6); v /= 6; end
      run4(k);
    end
    // 2-foldable patterns
    pattern(K_P, K_OE); pattern(K_P, K_OB); pattern(K_P, K_OC);
    pattern(K_P, K_C);  pattern(K_OE, K_C); pattern(K_OC, K_C);
    // 3-foldable patterns
    pattern(K_P, K_P, K_OE, K_OT, 3);  pattern(K_P, K_P, K_OB, K_OT, 3);
    pattern(K_P, K_P, K_OC, K_OT, 3);  pattern(K_P, K_OE, K_C, K_OT, 3);
    pattern(K_P, K_OC, K_C, K_OT, 3);  pattern(K_OE, K_C, K_C, K_OT, 3);
    pattern(K_OC, K_C, K_C, K_OT, 3);
    // 4-foldable patterns
    pattern(K_P, K_P, K_P, K_OE, 4);  pattern(K_P, K_P, K_P, K_OB, 4);
    pattern(K_P, K_P, K_P, K_OC, 4);  pattern(K_P, K_P, K_OE, K_C, 4);
    pattern(K_P, K_P, K_OC, K_C, 4);  pattern(K_P, K_OE, K_C, K_C, 4);
    pattern(K_P, K_OC, K_C, K_C, 4);  pattern(K_OE, K_C, K_C, K_C, 4);
    pattern(K_OC, K_C, K_C, K_C, 4);
    // 6-foldable cascade, random sequences biased towards producers
    for (int t = 0; t < 3000; t++) begin
      automatic kind_e ks[] = new[6];
      int n; kind_e gk; logic [15:0] ln;
      for (int i = 0; i < 6; i++) begin
        automatic int r = $urandom_range(0, 9);
        ks[i] = (r < 4) ? K_P : (r < 6) ? K_C : kind_e'($urandom_range(1, 4));
        poc6[i] = kind_bits(ks[i]);
      end
      #1;
      ref_fold(ks, 6, n, gk, ln);
      expect_eq("count6", int'(cnt6), n);
      expect_eq("lines6", int'(lines6), int'(ln[4:0]));
      expect_eq("type6", int'(gp6), int'(kind_bits(gk)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
