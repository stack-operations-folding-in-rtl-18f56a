// window_decoder: instruction extraction for a DECODE_BYTES-wide decoder.
//
// The decode window holds the next WIN_BYTES bytecode bytes, of which the
// first `avail` are valid. WIN_BYTES equals the decoder width DECODE_BYTES,
// but is never below 6 so that any length-decoded instruction can be issued
// on its own; instructions after the first are only considered for folding
// when they end within the first DECODE_BYTES bytes. Java instructions
// have variable length, so the start of instruction k is the sum of the
// lengths of instructions 0..k-1: a chain of N_FOLD classifiers, each
// reading the opcode at the offset the previous one produced. Slot k is
// valid when its whole instruction lies inside the valid bytes (and, for
// k > 0, inside the decoder width) and every earlier slot was valid with a
// known length. An invalid slot reports type O_T, so the folding logic
// never folds across the window edge or an incomplete instruction. wide
// is resolved here from its second byte (6 bytes before iinc, 4
// otherwise). tableswitch/lookupswitch have a length that depends on
// their address and tables; they are presented as O_T with length 1 and
// len_unknown set, and later slots are invalid.
// Purely combinational.
module window_decoder
  import fold_pkg::*;
#(
  parameter int unsigned DECODE_BYTES = 8,
  parameter int unsigned N_FOLD       = 4,
  // physical window: at least the longest length-decoded instruction
  localparam int unsigned WIN_BYTES = (DECODE_BYTES > 6) ? DECODE_BYTES : 6,
  localparam int unsigned AW = $clog2(WIN_BYTES + 1),  // avail width
  localparam int unsigned OW = $clog2(WIN_BYTES + 8)   // offset width
) (
  input  logic [7:0]    win         [WIN_BYTES],     // window bytes, 0 = oldest
  input  logic [AW-1:0] avail,                       // valid bytes in win
  output logic          slot_valid  [N_FOLD],
  output poc_t          slot_poc    [N_FOLD],        // O_T when not valid
  output logic [OW-1:0] slot_off    [N_FOLD],        // byte offset in window
  output logic [2:0]    slot_len    [N_FOLD],        // 1..6 bytes
  output logic [7:0]    slot_opcode [N_FOLD],
  output logic          len_unknown [N_FOLD]         // switch: length not known
);

  // Byte of the window at offset o, zero beyond its end.
  function automatic logic [7:0] byte_at(input logic [7:0] w [WIN_BYTES],
                                         input logic [OW-1:0] o);
    logic [7:0] b;
    b = 8'h00;
    for (int i = 0; i < WIN_BYTES; i++)
      if (o == OW'(i)) b = w[i];
    return b;
  endfunction

  // One stage per slot; each stage passes its end offset and "reached"
  // flag on to the next, so the chain is a plain ripple with no loop.
  for (genvar k = 0; k < N_FOLD; k++) begin : g_slot
    logic          reach_in, reach_out;
    logic [OW-1:0] off_in, off_out;
    logic [7:0]    opc;
    poc_t          cls_poc;
    logic [2:0]    cls_len, l;
    logic          cls_var, whole;

    if (k == 0) begin : g_first
      assign reach_in = 1'b1;
      assign off_in   = '0;
    end else begin : g_next
      assign reach_in = g_slot[k-1].reach_out;
      assign off_in   = g_slot[k-1].off_out;
    end

    assign opc = byte_at(win, off_in);

    poc_classifier u_cls (
      .opcode (opc),
      .poc    (cls_poc),
      .len    (cls_len),
      .len_var(cls_var)
    );

    always_comb begin
      if (opc == OPC_WIDE)
        l = (byte_at(win, off_in + OW'(1)) == OPC_IINC) ? 3'd6 : 3'd4;
      else
        l = cls_len;
      // the first instruction only has to be in the window; the ones it
      // may fold with must also end within the decoder width
      whole = (OW'(avail) >= off_in + OW'(l)) &&
              ((k == 0) || (off_in + OW'(l) <= OW'(DECODE_BYTES)));
    end

    assign slot_valid[k]  = reach_in && whole;
    assign slot_poc[k]    = slot_valid[k] ? cls_poc : POC_OT;
    assign slot_off[k]    = off_in;
    assign slot_len[k]    = l;
    assign slot_opcode[k] = opc;
    assign len_unknown[k] = reach_in && cls_var && (opc != OPC_WIDE)
                            && (OW'(avail) > off_in);
    assign reach_out      = slot_valid[k] && !(cls_var && opc != OPC_WIDE);
    assign off_out        = off_in + OW'(l);
  end

endmodule
