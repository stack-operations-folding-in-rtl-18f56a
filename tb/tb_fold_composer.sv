// tb_fold_composer: operand redirection of issued folding groups.
//
// Random instruction windows are split into slots and folded by the
// reference model; the composer must mark each slot's role and list the
// producers' constants / local-variable indices as sources and the
// consumers' indices as destinations, in program order. The worked
// example of the folding model (iconst_2; iload 1; iadd; istore 2 ->
// one iadd reading constant 2 and LV 1, writing LV 2) is checked first.
module tb_fold_composer;
  import fold_pkg::*;
  import fold_ref_pkg::*;
  import fold_prog_pkg::*;

  localparam int DB = 8, NF = 4;

  int checks = 0, failures = 0;
  int null_primary_seen = 0, multi_dst_seen = 0;

  logic [7:0] win [DB];
  logic [3:0] off [NF];
  poc_t       poc [NF];
  logic [7:0] opc [NF];
  logic [2:0] cnt;
  role_e      role [NF];
  logic       pv;
  logic [1:0] ps;
  logic [7:0] pop;
  logic [2:0] nsrc, ndst;
  operand_t   src [NF-1];
  operand_t   dst [NF-1];

  fold_composer #(.DECODE_BYTES(DB), .N_FOLD(NF)) dut (
    .win(win), .slot_off(off), .slot_poc(poc), .slot_opcode(opc), .fold_count(cnt),
    .role(role), .primary_valid(pv), .primary_slot(ps), .primary_opcode(pop),
    .n_src(nsrc), .src(src), .n_dst(ndst), .dst(dst));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // Drive the composer with the window in w (all 8 bytes valid) and check.
  task automatic apply(byte unsigned w[DB]);
    kind_e ks[] = new[NF];
    int offs[NF], ops[NF];
    int o = 0, n, ns = 0, nd = 0;
    kind_e gk; logic [15:0] ln;
    bit reach = 1;
    for (int i = 0; i < DB; i++) win[i] = w[i];
    for (int k = 0; k < NF; k++) begin
      int op = (o < DB) ? w[o] : 0;
      int l  = ref_len(op, (o + 1 < DB) ? w[o+1] : 0);
      bit ok = reach && l != 0 && (o + l <= DB);
      offs[k] = o; ops[k] = op;
      ks[k] = ok ? ref_kind(op) : K_OT;
      off[k] = 4'(o); opc[k] = 8'(op); poc[k] = kind_bits(ks[k]);
      reach = ok;
      o += (l == 0) ? 1 : l;
    end
    ref_fold(ks, NF, n, gk, ln);
    cnt = 3'(n);
    #1;
    if (n == 1) begin
      expect_eq("single role", int'(role[0]), int'(ROLE_PRIMARY));
      expect_eq("single primary", int'(pop), ops[0]);
      expect_eq("single nsrc", int'(nsrc), 0);
      expect_eq("single ndst", int'(ndst), 0);
      return;
    end
    expect_eq("primary_valid", int'(pv), int'(gk != K_C));
    if (gk == K_C) null_primary_seen++;
    for (int k = 0; k < NF; k++) begin
      role_e er;
      if (k >= n) er = ROLE_NONE;
      else if (ks[k] == K_P) er = ROLE_SRC;
      else if (ks[k] == K_C) er = ROLE_DST;
      else er = ROLE_PRIMARY;
      expect_eq($sformatf("role[%0d]", k), int'(role[k]), int'(er));
      if (er == ROLE_PRIMARY) begin
        expect_eq("primary_slot", int'(ps), k);
        expect_eq("primary_opcode", int'(pop), ops[k]);
      end
      if (er == ROLE_SRC || er == ROLE_DST) begin
        bit lv; int v;
        operand_t got;
        int b1 = (offs[k] + 1 < DB) ? w[offs[k]+1] : 0;
        int b2 = (offs[k] + 2 < DB) ? w[offs[k]+2] : 0;
        ref_operand(ops[k], b1, b2, lv, v);
        got = (er == ROLE_SRC) ? src[ns] : dst[nd];
        if (er == ROLE_SRC) ns++; else nd++;
        expect_eq("operand valid", int'(got.valid), 1);
        expect_eq("operand is_lv", int'(got.is_lv), int'(lv));
        expect_eq("operand value", int'(got.value), v & 16'hFFFF);
        expect_eq("operand opcode", int'(got.opcode), ops[k]);
      end
    end
    if (nd > 1) multi_dst_seen++;
    expect_eq("n_src", int'(nsrc), ns);
    expect_eq("n_dst", int'(ndst), nd);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned w[DB];
    // iconst_2; iload 1; iadd; istore 2; nop
    w = '{8'h05, 8'h15, 8'h01, 8'h60, 8'h36, 8'h02, 8'h00, 8'h00};
    apply(w);
    expect_eq("example count", int'(cnt), 4);
    expect_eq("example src0 const", int'(src[0].value), 2);
    expect_eq("example src1 LV", int'(src[1].value), 1);
    expect_eq("example src1 is_lv", int'(src[1].is_lv), 1);
    expect_eq("example primary iadd", int'(pop), 8'h60);
    expect_eq("example dst LV", int'(dst[0].value), 2);
    // iload_1; istore_3 (producer straight into consumer, null primary)
    w = '{8'h1B, 8'h3E, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    apply(w);
    expect_eq("move primary_valid", int'(pv), 0);
    for (int t = 0; t < 20000; t++) begin
      automatic byte unsigned prog[$];
      while (prog.size() < DB) void'(gen_instr(prog, 1'b0));
      for (int i = 0; i < DB; i++) w[i] = prog[i];
      apply(w);
    end
    if (null_primary_seen == 0 || multi_dst_seen == 0) begin
      failures++;
      $display("FAIL coverage null=%0d multi_dst=%0d", null_primary_seen, multi_dst_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
