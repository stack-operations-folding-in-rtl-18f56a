// tb_fold_sweep: folding strategy x decoder width sweep.
//
// One synthetic bytecode stream is decoded by eleven decoder instances:
// the 2-, 3- and 4-foldable strategies at the recommended 8-byte window,
// the 4-foldable strategy at 2..7 and 9 bytes, and a 6-foldable one at
// 9 bytes. The stream mixes instruction classes with the dynamic
// frequencies reported for Java programs (producers 47.14 %, O_E 10.87 %,
// O_B 11.54 %, O_C 22.19 %, O_T 3.97 %, consumers 4.29 %); opcodes within
// a class and operand bytes are random, so the stream has no program
// structure and its folding rate is not that of real programs. Each
// instance runs with fetch and issue always enabled, every issued group
// is checked against the reference model for its width and strategy, and
// the share of instructions removed by folding ((instructions - groups) /
// instructions) and the cycle count are printed per configuration.
module tb_fold_sweep;
  import fold_pkg::*;
  import fold_ref_pkg::*;

  localparam int N_INSTR = 20000;
  localparam int NCFG = 11;
  localparam int CFG_NF [NCFG] = '{2, 3, 4, 4, 4, 4, 4, 4, 4, 4, 6};
  localparam int CFG_DB [NCFG] = '{8, 8, 8, 2, 3, 4, 5, 6, 7, 9, 9};

  int checks = 0, failures = 0;
  int done [NCFG];
  int n_instr [NCFG], n_groups [NCFG], n_cycles [NCFG];
  int folded_seen [NCFG];

  byte unsigned prog[$];
  int           prog_end;
  bit           prog_ready = 0;

  function automatic int pbyte(int a);
    return (a < prog.size()) ? prog[a] : 0;
  endfunction

  function automatic byte unsigned pick(kind_e k);
    case (k)
      K_P:  begin
        int r = $urandom_range(0, 2);
        return (r == 0) ? 8'($urandom_range(2, 8)) :
               (r == 1) ? 8'($urandom_range(21, 25)) : 8'($urandom_range(26, 45));
      end
      K_OE: return 8'($urandom_range(96, 131));
      K_OB: return 8'($urandom_range(153, 166));
      K_OC: begin
        int r = $urandom_range(0, 2);
        return (r == 0) ? 8'($urandom_range(46, 53)) :
               (r == 1) ? 8'($urandom_range(178, 184)) : 8'h12;
      end
      K_C:  return ($urandom_range(0, 1) == 0) ? 8'($urandom_range(54, 58))
                                               : 8'($urandom_range(59, 78));
      default: return ($urandom_range(0, 1) == 0) ? 8'h84 : 8'hA7;  // iinc, goto
    endcase
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %0d exp %0d", what, $time, got, exp);
    end
  endtask

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_INSTR; i++) begin
      automatic int r = $urandom_range(0, 9999);
      automatic kind_e k = (r < 4714) ? K_P : (r < 5801) ? K_OE : (r < 6955) ? K_OB :
                           (r < 9174) ? K_OC : (r < 9571) ? K_OT : K_C;
      automatic byte unsigned op = pick(k);
      automatic int l = ref_len(op, 0);
      prog.push_back(op);
      for (int j = 1; j < l; j++) prog.push_back(8'($urandom));
    end
    prog_end = prog.size();
    prog_ready = 1;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NF = CFG_NF[g];
    localparam int DB = CFG_DB[g];
    localparam int FB = 8;
    localparam int CW = $clog2(NF + 1);
    localparam int WB = (DB > 6) ? DB : 6;   // physical window
    localparam int OW = $clog2(WB + 8);
    localparam int SW = (NF > 1) ? $clog2(NF) : 1;

    logic          fetch_valid = 0, fetch_ready, issue_valid, escape;
    logic [7:0]    fetch_data [FB];
    logic [CW-1:0] fold_count, n_src, n_dst;
    logic [NF-2:0] k_foldable;
    poc_t          group_poc;
    logic [OW-1:0] group_len;
    role_e         role [NF];
    logic          primary_valid;
    logic [SW-1:0] primary_slot;
    logic [7:0]    primary_opcode;
    operand_t      src [NF-1];
    operand_t      dst [NF-1];

    fold_decoder_top #(.DECODE_BYTES(DB), .N_FOLD(NF), .BUF_BYTES(16), .FETCH_BYTES(FB)) dut (
      .clk(clk), .rst_n(rst_n), .flush(1'b0),
      .fetch_valid(fetch_valid), .fetch_data(fetch_data), .fetch_ready(fetch_ready),
      .issue_ready(1'b1), .issue_valid(issue_valid), .escape(escape),
      .fold_count(fold_count), .k_foldable(k_foldable), .group_poc(group_poc),
      .group_len(group_len), .role(role), .primary_valid(primary_valid),
      .primary_slot(primary_slot), .primary_opcode(primary_opcode),
      .n_src(n_src), .src(src), .n_dst(n_dst), .dst(dst));

    initial begin
      int pc, fetch_ptr;
      kind_e ks[] = new[NF];
      pc = 0; fetch_ptr = 0;
      done[g] = 0; n_instr[g] = 0; n_groups[g] = 0; n_cycles[g] = 0; folded_seen[g] = 0;
      foreach (fetch_data[i]) fetch_data[i] = 0;
      wait (prog_ready && rst_n);
      while (pc < prog_end) begin
        int a, o, n, glen;
        bit reach, iv;
        int offs[NF], lens[NF];
        kind_e gk; logic [15:0] ln;
        @(negedge clk);
        n_cycles[g]++;
        a = fetch_ptr - pc;
        if (a > WB) a = WB;
        o = 0; reach = 1;
        for (int k = 0; k < NF; k++) begin
          automatic int op = pbyte(pc + o);
          automatic int l  = ref_len(op, pbyte(pc + o + 1));
          automatic bit ok = reach && (o + l <= a) && (k == 0 || o + l <= DB);
          offs[k] = o; lens[k] = l;
          ks[k] = ok ? ref_kind(op) : K_OT;
          reach = ok;
          o += l;
        end
        ref_fold(ks, NF, n, gk, ln);
        iv = (a >= lens[0]);
        glen = offs[n-1] + lens[n-1];
        fetch_valid = 1;
        for (int i = 0; i < FB; i++) fetch_data[i] = 8'(pbyte(fetch_ptr + i));
        #1;
        expect_eq("issue_valid", int'(issue_valid), int'(iv));
        if (iv) begin
          expect_eq("fold_count", int'(fold_count), n);
          expect_eq("group_len", int'(group_len), glen);
          n_groups[g]++;
          n_instr[g] += n;
          if (n > 1) folded_seen[g]++;
          pc += glen;
        end
        if (fetch_ready) fetch_ptr += FB;
      end
      done[g] = 1;
    end
  end

  initial begin
    bit all_done;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int g = 0; g < NCFG; g++) if (done[g] == 0) all_done = 0;
    end while (!all_done);
    $display("strategy  width  instructions  groups  removed%%  cycles");
    for (int g = 0; g < NCFG; g++) begin
      $display("%0d-fold    %0d      %0d        %0d   %0d.%02d    %0d",
               CFG_NF[g], CFG_DB[g], n_instr[g], n_groups[g],
               (n_instr[g] - n_groups[g]) * 100 / n_instr[g],
               ((n_instr[g] - n_groups[g]) * 10000 / n_instr[g]) % 100, n_cycles[g]);
      checks++;
      if (n_instr[g] != N_INSTR || folded_seen[g] == 0) begin
        failures++;
        $display("FAIL config %0d: %0d instructions, %0d folded groups", g, n_instr[g], folded_seen[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
