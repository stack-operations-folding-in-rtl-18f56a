// tb_instr_buffer: the byte queue against a queue model.
//
// A counting byte stream is offered in 8-byte blocks with random valid;
// each cycle a random number of bytes up to avail is retired, with
// occasional flushes. The window must always show the oldest bytes of the
// model queue, avail must be min(count, 8), and fetch_ready must be high
// exactly when a whole block fits. Stimulus is applied on the falling
// edge and checked just before the rising edge.
module tb_instr_buffer;
  localparam int BUF = 16, FB = 8, WB = 8;

  int checks = 0, failures = 0;
  int full_seen = 0, flush_seen = 0, fetch_consume_seen = 0;

  logic       clk = 0, rst_n = 0, flush = 0, fetch_valid = 0, fetch_ready;
  logic [7:0] fetch_data [FB];
  logic [3:0] consume = 0, avail;
  logic [7:0] win [WB];
  logic [4:0] count;

  instr_buffer #(.BUF_BYTES(BUF), .FETCH_BYTES(FB), .WIN_BYTES(WB)) dut (
    .clk(clk), .rst_n(rst_n), .flush(flush), .fetch_valid(fetch_valid),
    .fetch_data(fetch_data), .fetch_ready(fetch_ready), .consume(consume),
    .win(win), .avail(avail), .count(count));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d exp %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned model[$];
    int next_byte = 0;
    for (int i = 0; i < FB; i++) fetch_data[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int a, c;
      bit fl, acc;
      @(negedge clk);
      // checks of the registered state
      a = (model.size() < WB) ? model.size() : WB;
      expect_eq("count", int'(count), model.size());
      expect_eq("avail", int'(avail), a);
      expect_eq("fetch_ready", int'(fetch_ready), int'(BUF - model.size() >= FB));
      for (int i = 0; i < a; i++) expect_eq("win byte", int'(win[i]), model[i]);
      if (model.size() == BUF) full_seen++;
      // new stimulus
      fl = ($urandom_range(0, 49) == 0);
      c  = $urandom_range(0, a);
      fetch_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < FB; i++) fetch_data[i] = 8'(next_byte + i);
      consume = 4'(c);
      flush   = fl;
      #1;
      acc = fetch_valid && fetch_ready;
      if (acc && c > 0 && !fl) fetch_consume_seen++;
      // model update for the coming edge
      if (fl) begin
        model.delete();
        flush_seen++;
      end else
        for (int i = 0; i < c; i++) void'(model.pop_front());
      if (acc) begin
        for (int i = 0; i < FB; i++) model.push_back(8'(next_byte + i));
        next_byte += FB;
      end
    end
    if (full_seen == 0 || flush_seen == 0 || fetch_consume_seen == 0) begin
      failures++;
      $display("FAIL coverage full=%0d flush=%0d both=%0d", full_seen, flush_seen, fetch_consume_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
