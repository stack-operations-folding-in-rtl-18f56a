// tb_poc_classifier: all 256 opcodes against the reference class and
// length lists. Also spot-checks the instructions the folding model names
// as examples: iconst_2 and iload (P), iadd (O_E), istore (C), inc-type
// iinc, goto and athrow (O_T), invokevirtual and array access (O_C).
module tb_poc_classifier;
  import fold_pkg::*;
  import fold_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0] opcode;
  poc_t       poc;
  logic [2:0] len;
  logic       len_var;

  poc_classifier dut (.opcode(opcode), .poc(poc), .len(len), .len_var(len_var));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s opcode=%02h: got %0d exp %0d", what, opcode, got, exp);
    end
  endtask

  task automatic spot(logic [7:0] op, poc_t exp);
    opcode = op;
    #1;
    expect_eq("example class", int'(poc), int'(exp));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 256; op++) begin
      int l;
      opcode = 8'(op);
      #1;
      expect_eq("class", int'(poc), int'(kind_bits(ref_kind(op))));
      l = ref_len(op, 0);
      if (op == 170 || op == 171 || op == 196) begin
        expect_eq("len_var", int'(len_var), 1);
      end else begin
        expect_eq("len_var", int'(len_var), 0);
        expect_eq("len", int'(len), l);
      end
    end
    spot(8'h05, POC_P);  spot(8'h15, POC_P);  spot(8'h60, POC_OE);
    spot(8'h36, POC_C);  spot(8'h84, POC_OT); spot(8'hA7, POC_OT);
    spot(8'hBF, POC_OT); spot(8'hB6, POC_OC); spot(8'h2E, POC_OC);
    spot(8'h99, POC_OB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
