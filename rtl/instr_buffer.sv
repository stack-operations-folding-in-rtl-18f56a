// instr_buffer: byte queue in front of the folding decoder.
//
// Instruction fetch delivers FETCH_BYTES bytecode bytes at a time; the
// decoder looks at the oldest WIN_BYTES bytes (the decode window) and, each
// cycle, retires the bytes of the folding group it issued. Because Java
// instructions have variable length, the number of bytes retired per cycle
// varies (0 to WIN_BYTES), so the queue shifts by `consume` bytes and
// appends an accepted fetch block right behind the remaining bytes.
// Interface: valid/ready on the fetch side (ready when a whole block fits),
// `consume` from the decoder (must not exceed `avail`), `flush` to drop
// everything, e.g. on a taken branch; a fetch block accepted in the flush
// cycle becomes the start of the new stream. The window and avail are
// register outputs: a block written in cycle t is visible in cycle t+1.
// Reset is synchronous and active low. The queue depth BUF_BYTES is a
// design choice (twice the fetch width).
module instr_buffer #(
  parameter int unsigned BUF_BYTES   = 16,
  parameter int unsigned FETCH_BYTES = 8,
  parameter int unsigned WIN_BYTES   = 8,
  localparam int unsigned CNTW = $clog2(BUF_BYTES + 1),
  localparam int unsigned AW   = $clog2(WIN_BYTES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             fetch_valid,
  input  logic [7:0]       fetch_data [FETCH_BYTES],   // byte 0 first in program order
  output logic             fetch_ready,
  input  logic [AW-1:0]    consume,                    // bytes retired this cycle
  output logic [7:0]       win        [WIN_BYTES],
  output logic [AW-1:0]    avail,                      // valid bytes in win
  output logic [CNTW-1:0]  count                       // bytes held
);

  logic [7:0]      q [BUF_BYTES];
  logic [CNTW-1:0] cnt;
  logic [CNTW-1:0] keep;       // bytes left after retiring `consume`
  logic            take;

  assign fetch_ready = (CNTW'(BUF_BYTES) - cnt) >= CNTW'(FETCH_BYTES);
  assign take        = fetch_valid && fetch_ready;
  assign keep        = flush ? '0 : cnt - CNTW'(consume);
  assign count       = cnt;

  always_comb begin
    for (int i = 0; i < WIN_BYTES; i++) win[i] = q[i];
    avail = (cnt >= CNTW'(WIN_BYTES)) ? AW'(WIN_BYTES) : AW'(cnt);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < BUF_BYTES; i++) q[i] <= 8'h00;
    end else begin
      for (int i = 0; i < BUF_BYTES; i++) begin
        if (CNTW'(i) < keep)
          q[i] <= q[(i + int'(consume)) % BUF_BYTES];
        else if (take && (i - int'(keep)) < int'(FETCH_BYTES))
          q[i] <= fetch_data[(i - int'(keep)) % FETCH_BYTES];
      end
      cnt <= keep + (take ? CNTW'(FETCH_BYTES) : '0);
    end
  end

  // The decoder may only retire bytes it has seen.
  a_consume_le_avail: assert property (@(posedge clk) disable iff (!rst_n)
    flush || consume <= avail);

endmodule
