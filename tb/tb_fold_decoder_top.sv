// tb_fold_decoder_top: end-to-end run of the folding decoder at its default
// sizes (8-byte decode window, 4-foldable, 16-byte buffer, 8-byte fetch).
//
// A random bytecode program (starting with the worked example iconst_2;
// iload 1; iadd; istore 2) is fetched in 8-byte blocks with random fetch
// and issue stalls. The testbench keeps its own program counter and fetch
// pointer, so it knows exactly which bytes the decoder holds; every cycle
// it decodes that window with the reference model (instruction lengths,
// classes, folding-rule state machine) and compares validity, group size,
// the 2/3/4-foldable lines, folded type, byte length, primary opcode and
// redirected operands. Switch instructions make the decoder raise escape;
// the testbench then skips them with a flush, and some issued branches are
// treated as taken with a flush to a later instruction. The mechanisms
// exercised are counted, and each must occur at least once.
module tb_fold_decoder_top;
  import fold_pkg::*;
  import fold_ref_pkg::*;
  import fold_prog_pkg::*;

  localparam int DB = 8, NF = 4, BUF = 16, FB = 8;
  localparam int N_INSTR = 20000;

  int checks = 0, failures = 0;

  // mechanism counters
  int groups_of [NF+1];
  int stall_cycles = 0, window_cuts = 0, issue_backpressure = 0;
  int fetch_backpressure = 0, escapes = 0, branch_flushes = 0;
  int example_folded = 0, instrs_issued = 0, cycles = 0;

  logic       clk = 0, rst_n = 0, flush = 0;
  logic       fetch_valid = 0, fetch_ready;
  logic [7:0] fetch_data [FB];
  logic       issue_ready = 0, issue_valid, escape;
  logic [2:0] fold_count;
  logic [2:0] k_foldable;
  poc_t       group_poc;
  logic [3:0] group_len;
  role_e      role [NF];
  logic       primary_valid;
  logic [1:0] primary_slot;
  logic [7:0] primary_opcode;
  logic [2:0] n_src, n_dst;
  operand_t   src [NF-1];
  operand_t   dst [NF-1];

  fold_decoder_top dut (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .fetch_valid(fetch_valid), .fetch_data(fetch_data), .fetch_ready(fetch_ready),
    .issue_ready(issue_ready), .issue_valid(issue_valid), .escape(escape),
    .fold_count(fold_count), .k_foldable(k_foldable), .group_poc(group_poc),
    .group_len(group_len), .role(role), .primary_valid(primary_valid),
    .primary_slot(primary_slot), .primary_opcode(primary_opcode),
    .n_src(n_src), .src(src), .n_dst(n_dst), .dst(dst));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %0d exp %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned prog[$];
  int           sw_len [int];     // length of each switch, by address
  int           starts [$];       // instruction start addresses

  function automatic int pbyte(int a);
    return (a < prog.size()) ? prog[a] : 0;
  endfunction

  initial begin
    int pc = 0, fetch_ptr = 0, prog_end;
    // program: worked example, then random instructions, then nop padding
    foreach (fetch_data[i]) fetch_data[i] = 0;
    for (int i = 0; i <= NF; i++) groups_of[i] = 0;
    starts.push_back(0); prog.push_back(8'h05);
    starts.push_back(1); prog.push_back(8'h15); prog.push_back(8'h01);
    starts.push_back(3); prog.push_back(8'h60);
    starts.push_back(4); prog.push_back(8'h36); prog.push_back(8'h02);
    for (int i = 0; i < N_INSTR; i++) begin
      automatic int a = prog.size();
      int l;
      starts.push_back(a);
      l = gen_instr(prog, 1'b1);
      if (prog[a] == 8'hAA) sw_len[a] = l;
    end
    prog_end = prog.size();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    while (pc < prog_end) begin
      int  a, n, o, glen, target;
      bit  reach, esc_ref, iv_ref, acc, do_flush;
      kind_e ks[] = new[NF];
      int  offs[NF], lens[NF], ops[NF];
      kind_e gk; logic [15:0] ln;

      @(negedge clk);
      cycles++;
      // ---- reference decode of the bytes the decoder holds ----
      a = fetch_ptr - pc;
      if (a > DB) a = DB;
      o = 0; reach = 1; esc_ref = 0;
      for (int k = 0; k < NF; k++) begin
        automatic int op = pbyte(pc + o);
        automatic int l  = ref_len(op, pbyte(pc + o + 1));
        automatic bit sw = (l == 0);
        bit ok;
        if (sw) l = 1;
        ok = reach && (o + l <= a);
        if (k == 0 && sw && ok) esc_ref = 1;
        if (reach && !ok && o < a) window_cuts++;
        offs[k] = o; lens[k] = l; ops[k] = op;
        ks[k] = ok ? ref_kind(op) : K_OT;
        reach = ok && !sw;
        o += l;
      end
      ref_fold(ks, NF, n, gk, ln);
      iv_ref = (ks[0] != K_OT || (a >= lens[0])) && (a >= lens[0]) && !esc_ref;
      glen = offs[n-1] + lens[n-1];

      // ---- stimulus ----
      do_flush = 0;
      target = pc;
      if (esc_ref) begin
        do_flush = 1;
        target = pc + sw_len[pc];
        escapes++;
      end else if (iv_ref && gk == K_OB && n >= 1 && $urandom_range(0, 3) == 0) begin
        // treat this branch as taken: issue it now, flush next cycle
      end
      flush       = do_flush;
      issue_ready = ($urandom_range(0, 6) != 0);
      fetch_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < FB; i++) fetch_data[i] = 8'(pbyte((do_flush ? target : fetch_ptr) + i));
      #1;

      // ---- compare ----
      expect_eq("escape", int'(escape), int'(esc_ref));
      expect_eq("issue_valid", int'(issue_valid), int'(iv_ref));
      expect_eq("fetch_ready", int'(fetch_ready), int'(BUF - (fetch_ptr - pc) >= FB));
      if (iv_ref) begin
        automatic int ns = 0, nd = 0;
        expect_eq("fold_count", int'(fold_count), n);
        expect_eq("k_foldable", int'(k_foldable), int'(ln[2:0]));
        expect_eq("group_len", int'(group_len), glen);
        expect_eq("group_poc", int'(group_poc), int'(kind_bits(n == 1 ? ks[0] : gk)));
        for (int k = 0; k < n && n > 1; k++) begin
          bit lv; int v;
          ref_operand(ops[k], pbyte(pc + offs[k] + 1), pbyte(pc + offs[k] + 2), lv, v);
          if (ks[k] == K_P) begin
            expect_eq("src value", int'(src[ns].value), v & 16'hFFFF);
            expect_eq("src is_lv", int'(src[ns].is_lv), int'(lv));
            ns++;
          end else if (ks[k] == K_C) begin
            expect_eq("dst value", int'(dst[nd].value), v & 16'hFFFF);
            nd++;
          end else
            expect_eq("primary_opcode", int'(primary_opcode), ops[k]);
        end
        if (n == 1) expect_eq("primary_opcode", int'(primary_opcode), ops[0]);
        expect_eq("n_src", int'(n_src), ns);
        expect_eq("n_dst", int'(n_dst), nd);
      end

      // ---- state for the coming clock edge ----
      acc = fetch_valid && fetch_ready;
      if (fetch_valid && !fetch_ready) fetch_backpressure++;
      if (!iv_ref && !esc_ref) stall_cycles++;
      if (do_flush) begin
        pc = target;
        fetch_ptr = target + (acc ? FB : 0);
      end else begin
        if (iv_ref && issue_ready) begin
          groups_of[n]++;
          instrs_issued += n;
          if (pc == 0 && n == 4) example_folded++;
          pc += glen;
        end else if (iv_ref) issue_backpressure++;
        if (acc) fetch_ptr += FB;
      end
      if (!do_flush && iv_ref && issue_ready && gk == K_OB && n > 1 &&
          $urandom_range(0, 3) == 0) begin
        // taken branch: redirect at the next edge to a later instruction
        automatic int t = pc;
        foreach (starts[i]) if (starts[i] > pc + 3 && t == pc) t = starts[i];
        @(negedge clk);
        cycles++;
        flush = 1;
        issue_ready = $urandom_range(0, 1);
        fetch_valid = 1;
        for (int i = 0; i < FB; i++) fetch_data[i] = 8'(pbyte(t + i));
        #1;
        acc = fetch_ready;
        pc = t;
        fetch_ptr = t + (acc ? FB : 0);
        branch_flushes++;
      end
    end
    @(negedge clk);
    flush = 0; fetch_valid = 0; issue_ready = 0;

    $display("cycles=%0d instructions=%0d groups 1/2/3/4 = %0d/%0d/%0d/%0d",
             cycles, instrs_issued, groups_of[1], groups_of[2], groups_of[3], groups_of[4]);
    $display("stalls=%0d window_cuts=%0d issue_backpressure=%0d fetch_backpressure=%0d escapes=%0d branch_flushes=%0d example=%0d",
             stall_cycles, window_cuts, issue_backpressure, fetch_backpressure,
             escapes, branch_flushes, example_folded);
    checks++;
    if (groups_of[1] == 0 || groups_of[2] == 0 || groups_of[3] == 0 || groups_of[4] == 0 ||
        stall_cycles == 0 || window_cuts == 0 || issue_backpressure == 0 ||
        fetch_backpressure == 0 || escapes == 0 || branch_flushes == 0 || example_folded != 1) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
