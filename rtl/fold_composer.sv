// fold_composer: turns an issued folding group into one compound instruction.
//
// Inside a group the producers come first, then at most one operator, then
// the consumers. Folding removes the stack traffic between them: each
// producer's constant or local-variable index becomes a source operand of
// the primary (operator) instruction, and each consumer's local-variable
// index becomes a destination of its result. A group without an operator
// (producers followed by a store) has a null primary: it is a plain move
// from the sources to the destination, reported with primary_valid low.
// A group of one instruction is issued unchanged as its own primary.
//
// Operand decoding (from the JVM instruction formats): iconst_m1..iconst_5,
// lconst_*, fconst_*, dconst_* and aconst_null give small constants;
// bipush and sipush give their signed immediate; xload / xstore give the
// index byte; xload_<n> / xstore_<n> give n. Values are sign-extended to 16
// bits; the opcode travels with each operand so the data type is kept.
// Purely combinational.
module fold_composer
  import fold_pkg::*;
#(
  parameter int unsigned DECODE_BYTES = 8,
  parameter int unsigned N_FOLD       = 4,
  localparam int unsigned WIN_BYTES = (DECODE_BYTES > 6) ? DECODE_BYTES : 6,
  localparam int unsigned OW = $clog2(WIN_BYTES + 8),
  localparam int unsigned CW = $clog2(N_FOLD + 1),
  localparam int unsigned SW = (N_FOLD > 1) ? $clog2(N_FOLD) : 1
) (
  input  logic [7:0]    win          [WIN_BYTES],    // decode window
  input  logic [OW-1:0] slot_off     [N_FOLD],
  input  poc_t          slot_poc     [N_FOLD],
  input  logic [7:0]    slot_opcode  [N_FOLD],
  input  logic [CW-1:0] fold_count,                 // 1..N_FOLD
  output role_e         role         [N_FOLD],
  output logic          primary_valid,              // 0: null primary (move)
  output logic [SW-1:0] primary_slot,
  output logic [7:0]    primary_opcode,
  output logic [CW-1:0] n_src,
  output operand_t      src          [N_FOLD-1],    // in program order
  output logic [CW-1:0] n_dst,
  output operand_t      dst          [N_FOLD-1]     // in program order
);

  function automatic logic [7:0] byte_at(input logic [7:0] w [WIN_BYTES],
                                         input logic [OW-1:0] o);
    logic [7:0] b;
    b = 8'h00;
    for (int i = 0; i < WIN_BYTES; i++)
      if (o == OW'(i)) b = w[i];
    return b;
  endfunction

  // Operand carried by a producer or consumer instruction.
  function automatic operand_t decode_operand(input logic [7:0] opc,
                                              input logic [7:0] b1,
                                              input logic [7:0] b2);
    operand_t r;
    logic [7:0] rel;
    r        = '0;
    r.valid  = 1'b1;
    r.opcode = opc;
    r.is_lv  = 1'b0;
    if (opc >= 8'h02 && opc <= 8'h08)       r.value = 16'(signed'({8'h00, opc}) - 16'sd3);
    else if (opc == 8'h09 || opc == 8'h0A)  r.value = 16'(opc - 8'h09);
    else if (opc >= 8'h0B && opc <= 8'h0D)  r.value = 16'(opc - 8'h0B);
    else if (opc == 8'h0E || opc == 8'h0F)  r.value = 16'(opc - 8'h0E);
    else if (opc == 8'h10)                  r.value = {{8{b1[7]}}, b1};
    else if (opc == 8'h11)                  r.value = {b1, b2};
    else if ((opc >= 8'h15 && opc <= 8'h19) || (opc >= 8'h36 && opc <= 8'h3A)) begin
      r.is_lv = 1'b1;
      r.value = {8'h00, b1};
    end else if (opc >= 8'h1A && opc <= 8'h2D) begin
      rel     = opc - 8'h1A;
      r.is_lv = 1'b1;
      r.value = {14'd0, rel[1:0]};
    end else if (opc >= 8'h3B && opc <= 8'h4E) begin
      rel     = opc - 8'h3B;
      r.is_lv = 1'b1;
      r.value = {14'd0, rel[1:0]};
    end else                                r.value = 16'd0;  // aconst_null
    return r;
  endfunction

  always_comb begin
    primary_valid  = 1'b0;
    primary_slot   = '0;
    primary_opcode = 8'h00;
    n_src          = '0;
    n_dst          = '0;
    for (int i = 0; i < N_FOLD - 1; i++) begin
      src[i] = '0;
      dst[i] = '0;
    end
    for (int k = 0; k < N_FOLD; k++) begin
      operand_t op;
      op = decode_operand(slot_opcode[k],
                          byte_at(win, slot_off[k] + OW'(1)),
                          byte_at(win, slot_off[k] + OW'(2)));
      role[k] = ROLE_NONE;
      if (CW'(k) < fold_count) begin
        if (fold_count == CW'(1) || is_operator(slot_poc[k])) begin
          role[k]        = ROLE_PRIMARY;
          primary_valid  = 1'b1;
          primary_slot   = SW'(k);
          primary_opcode = slot_opcode[k];
        end else if (slot_poc[k] == POC_P) begin
          role[k] = ROLE_SRC;
          for (int j = 0; j < N_FOLD - 1; j++)
            if (CW'(j) == n_src) src[j] = op;
          n_src = n_src + CW'(1);
        end else begin
          role[k] = ROLE_DST;
          for (int j = 0; j < N_FOLD - 1; j++)
            if (CW'(j) == n_dst) dst[j] = op;
          n_dst = n_dst + CW'(1);
        end
      end
    end
  end

endmodule
