// fold_decoder_top: Java bytecode decoder with 4-foldable stack-operation
// folding.
//
// A stack machine spends many cycles moving data between local variables,
// constants and the operand stack. Folding spots short runs of truly
// dependent instructions - producers (loads, constants), one operator and
// consumers (stores) - and issues them as one compound instruction whose
// operands are read straight from the local variables / constants and
// whose result is written straight to the destination local variable.
//
// Path through the decoder, one folding group per clock:
//   instr_buffer   byte queue fed by instruction fetch; presents the oldest
//                  bytes as the decode window (register outputs): DECODE_BYTES
//                  of them, or 6 for narrower decoders, so that the longest
//                  length-decoded instruction can still issue alone
//   window_decoder finds the first N_FOLD instructions in the window and
//                  their 4-bit POC types (incomplete ones read as O_T)
//   folding_logic  cascade of N_FOLD-1 folding units -> group size
//   fold_composer  redirects producer/consumer operands into the primary
// The group and its byte length are combinational from the window; when
// issue_valid && issue_ready the buffer retires group_len bytes at the
// clock edge. The default sizes are the recommended configuration: an
// 8-byte decoder with the 4-foldable strategy. issue_valid stays low while
// the window does not yet hold a whole first instruction, and while the
// first instruction is a tableswitch/lookupswitch (escape high), whose
// length this decoder does not compute; the execution side then has to
// take the instruction over and flush.
module fold_decoder_top
  import fold_pkg::*;
#(
  parameter int unsigned DECODE_BYTES = 8,
  parameter int unsigned N_FOLD       = 4,
  parameter int unsigned BUF_BYTES    = 16,
  parameter int unsigned FETCH_BYTES  = 8,
  localparam int unsigned WIN_BYTES = (DECODE_BYTES > 6) ? DECODE_BYTES : 6,
  localparam int unsigned AW = $clog2(WIN_BYTES + 1),
  localparam int unsigned OW = $clog2(WIN_BYTES + 8),
  localparam int unsigned CW = $clog2(N_FOLD + 1),
  localparam int unsigned SW = (N_FOLD > 1) ? $clog2(N_FOLD) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // instruction fetch
  input  logic              fetch_valid,
  input  logic [7:0]        fetch_data [FETCH_BYTES],
  output logic              fetch_ready,
  // issued folding group
  input  logic              issue_ready,
  output logic              issue_valid,
  output logic              escape,          // first instruction is a switch
  output logic [CW-1:0]     fold_count,      // instructions in the group
  output logic [N_FOLD-2:0] k_foldable,      // bit k: (k+2)-foldable line
  output poc_t              group_poc,       // type of the folded instruction
  output logic [OW-1:0]     group_len,       // bytes in the group
  output role_e             role           [N_FOLD],
  output logic              primary_valid,
  output logic [SW-1:0]     primary_slot,
  output logic [7:0]        primary_opcode,
  output logic [CW-1:0]     n_src,
  output operand_t          src            [N_FOLD-1],
  output logic [CW-1:0]     n_dst,
  output operand_t          dst            [N_FOLD-1]
);

  logic [7:0]    win [WIN_BYTES];
  logic [AW-1:0] avail;
  logic [AW-1:0] consume;

  logic          slot_valid  [N_FOLD];
  poc_t          slot_poc    [N_FOLD];
  logic [OW-1:0] slot_off    [N_FOLD];
  logic [2:0]    slot_len    [N_FOLD];
  logic [7:0]    slot_opcode [N_FOLD];
  logic          len_unknown [N_FOLD];

  instr_buffer #(
    .BUF_BYTES  (BUF_BYTES),
    .FETCH_BYTES(FETCH_BYTES),
    .WIN_BYTES  (WIN_BYTES)
  ) u_buf (
    .clk        (clk),
    .rst_n      (rst_n),
    .flush      (flush),
    .fetch_valid(fetch_valid),
    .fetch_data (fetch_data),
    .fetch_ready(fetch_ready),
    .consume    (consume),
    .win        (win),
    .avail      (avail),
    .count      ()
  );

  window_decoder #(
    .DECODE_BYTES(DECODE_BYTES),
    .N_FOLD      (N_FOLD)
  ) u_win (
    .win        (win),
    .avail      (avail),
    .slot_valid (slot_valid),
    .slot_poc   (slot_poc),
    .slot_off   (slot_off),
    .slot_len   (slot_len),
    .slot_opcode(slot_opcode),
    .len_unknown(len_unknown)
  );

  folding_logic #(
    .N_FOLD(N_FOLD)
  ) u_fold (
    .poc       (slot_poc),
    .k_foldable(k_foldable),
    .fold_count(fold_count),
    .group_poc (group_poc)
  );

  fold_composer #(
    .DECODE_BYTES(DECODE_BYTES),
    .N_FOLD      (N_FOLD)
  ) u_comp (
    .win           (win),
    .slot_off      (slot_off),
    .slot_poc      (slot_poc),
    .slot_opcode   (slot_opcode),
    .fold_count    (fold_count),
    .role          (role),
    .primary_valid (primary_valid),
    .primary_slot  (primary_slot),
    .primary_opcode(primary_opcode),
    .n_src         (n_src),
    .src           (src),
    .n_dst         (n_dst),
    .dst           (dst)
  );

  // Byte length of the group: end of its last instruction.
  always_comb begin
    group_len = '0;
    for (int k = 0; k < N_FOLD; k++)
      if (CW'(k + 1) == fold_count) group_len = slot_off[k] + OW'(slot_len[k]);
  end

  assign escape      = len_unknown[0];
  assign issue_valid = slot_valid[0] && !len_unknown[0];
  assign consume     = (issue_valid && issue_ready && !flush) ? AW'(group_len) : '0;

  // A folded group never extends past the valid window bytes.
  a_group_in_window: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid |-> (group_len <= OW'(avail)));

endmodule
