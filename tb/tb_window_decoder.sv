// tb_window_decoder: random 8-byte windows of real instruction streams,
// with random numbers of valid bytes, against a serial walk that adds up
// instruction lengths. Each slot's validity, offset, length, opcode and
// type are compared; a slot whose instruction is cut by the end of the
// valid bytes, or that follows a switch, must read as O_T. A second,
// 4-byte-wide decoder (6-byte physical window) checks that an instruction
// longer than the width still issues alone while later instructions are
// only taken when they end within the width.
module tb_window_decoder;
  import fold_pkg::*;
  import fold_ref_pkg::*;
  import fold_prog_pkg::*;

  localparam int DB = 8, NF = 4;

  int checks = 0, failures = 0;
  int cut_seen = 0, switch_seen = 0, wide_seen = 0;

  logic [7:0] win [DB];
  logic [3:0] avail;
  logic       sv [NF];
  poc_t       sp [NF];
  logic [3:0] so [NF];
  logic [2:0] sl [NF];
  logic [7:0] sop [NF];
  logic       lu [NF];

  window_decoder #(.DECODE_BYTES(DB), .N_FOLD(NF)) dut (
    .win(win), .avail(avail), .slot_valid(sv), .slot_poc(sp), .slot_off(so),
    .slot_len(sl), .slot_opcode(sop), .len_unknown(lu));

  // Narrow decoder: 4-byte folding width inside a 6-byte physical window.
  localparam int DBN = 4, WBN = 6;
  int width_cut_seen = 0, long_alone_seen = 0;
  logic [7:0] winn [WBN];
  logic [2:0] availn;
  logic       svn [NF];
  poc_t       spn [NF];
  logic [3:0] son [NF];
  logic [2:0] sln [NF];
  logic [7:0] sopn [NF];
  logic       lun [NF];

  window_decoder #(.DECODE_BYTES(DBN), .N_FOLD(NF)) dut_narrow (
    .win(winn), .avail(availn), .slot_valid(svn), .slot_poc(spn), .slot_off(son),
    .slot_len(sln), .slot_opcode(sopn), .len_unknown(lun));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
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
    for (int t = 0; t < 5000; t++) begin
      automatic byte unsigned prog[$];
      int off, a;
      bit reach;
      while (prog.size() < DB + 8) void'(gen_instr(prog, 1'b1));
      a = $urandom_range(0, DB);
      for (int i = 0; i < DB; i++) win[i] = (i < a) ? prog[i] : 8'($urandom);
      avail = 4'(a);
      #1;
      off = 0;
      reach = 1;
      for (int k = 0; k < NF; k++) begin
        automatic int op = (off < DB) ? prog[off] : 0;
        automatic int l  = ref_len(op, (off + 1 < DB) ? prog[off+1] : 0);
        automatic bit sw = (l == 0);
        bit ok;
        if (sw) l = 1;
        ok = reach && (off + l <= a);
        if (reach && !ok && off < a) cut_seen++;
        if (ok && sw) switch_seen++;
        if (ok && op == 196) wide_seen++;
        expect_eq($sformatf("valid[%0d]", k), int'(sv[k]), int'(ok));
        expect_eq($sformatf("poc[%0d]", k), int'(sp[k]), ok ? int'(kind_bits(ref_kind(op))) : 0);
        if (reach) expect_eq($sformatf("off[%0d]", k), int'(so[k]), off);
        if (ok) begin
          expect_eq($sformatf("len[%0d]", k), int'(sl[k]), l);
          expect_eq($sformatf("opcode[%0d]", k), int'(sop[k]), op);
          expect_eq($sformatf("len_unknown[%0d]", k), int'(lu[k]), int'(sw));
        end
        reach = ok && !sw;
        off  += l;
      end
      // narrow decoder on the same stream
      a = $urandom_range(0, WBN);
      for (int i = 0; i < WBN; i++) winn[i] = (i < a) ? prog[i] : 8'($urandom);
      availn = 3'(a);
      #1;
      off = 0;
      reach = 1;
      for (int k = 0; k < NF; k++) begin
        automatic int op = prog[off];
        automatic int l  = ref_len(op, prog[off+1]);
        automatic bit sw = (l == 0);
        bit ok;
        if (sw) l = 1;
        ok = reach && (off + l <= a) && (k == 0 || off + l <= DBN);
        if (reach && k > 0 && off + l <= a && off + l > DBN) width_cut_seen++;
        if (ok && k == 0 && l > DBN) long_alone_seen++;
        expect_eq($sformatf("narrow valid[%0d]", k), int'(svn[k]), int'(ok));
        expect_eq($sformatf("narrow poc[%0d]", k), int'(spn[k]), ok ? int'(kind_bits(ref_kind(op))) : 0);
        if (ok) expect_eq($sformatf("narrow off[%0d]", k), int'(son[k]), off);
        reach = ok && !sw;
        off  += l;
      end
    end
    if (width_cut_seen == 0 || long_alone_seen == 0) begin
      failures++;
      $display("FAIL narrow coverage: width cuts=%0d long alone=%0d", width_cut_seen, long_alone_seen);
    end
    if (cut_seen == 0 || switch_seen == 0 || wide_seen == 0) begin
      failures++;
      $display("FAIL coverage: cut=%0d switch=%0d wide=%0d", cut_seen, switch_seen, wide_seen);
    end
    $display("window cuts=%0d switches=%0d wide=%0d", cut_seen, switch_seen, wide_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
