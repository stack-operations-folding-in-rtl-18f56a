// tb_folding_unit: exhaustive check of the 2-fold unit.
//
// All 6 x 6 pairs of instruction classes, with the continue input high and
// low, are compared with the pairwise folding table of the folding model:
// P before O_E/O_B/O_C/C folds; O_E or O_C before C folds; P before P or an
// operator (and O_E/O_C before C) may keep folding; the combined type is
// the second instruction's when the first is a producer and the second is
// not O_T. Purely combinational, so a 1 ns settle time per vector.
module tb_folding_unit;
  import fold_pkg::*;
  import fold_ref_pkg::*;

  int checks = 0, failures = 0;

  poc_t a, b, comb;
  logic cin, foldable, cout;

  folding_unit dut (.poc_n(a), .poc_n1(b), .cont_in(cin),
                    .foldable(foldable), .poc_comb(comb), .cont_out(cout));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b cin=%b got %b exp %b", what, a, b, cin, got, exp);
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
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int c = 0; c < 2; c++) begin
          automatic kind_e ka = kind_e'(i), kb = kind_e'(j);
          logic ef, ec;
          kind_e ek;
          a = kind_bits(ka); b = kind_bits(kb); cin = c[0];
          #1;
          ef = cin && ((ka == K_P && kb inside {K_OE, K_OB, K_OC, K_C}) ||
                       (ka inside {K_OE, K_OC} && kb == K_C));
          ec = cin && ((ka == K_P && kb inside {K_P, K_OE, K_OB, K_OC}) ||
                       (ka inside {K_OE, K_OC} && kb == K_C));
          ek = (ka == K_P && kb != K_OT) ? kb : ka;
          check("foldable", foldable, ef);
          check("continue", cout, ec);
          checks++;
          if (comb !== kind_bits(ek)) begin
            failures++;
            $display("FAIL combined: a=%b b=%b got %b exp %b", a, b, comb, kind_bits(ek));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
