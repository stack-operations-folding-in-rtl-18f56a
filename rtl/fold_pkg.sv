// fold_pkg: types and constants shared by the stack-folding decoder.
//
// Every bytecode instruction is summarised by a 4-bit POC type code. The
// codes of the producer (P), the three folding operators (O_E, O_B, O_C),
// the terminating operator (O_T) and the consumer (C) follow the bit
// assignment of the folding model: bit 3 marks a producer, bit 0 a consumer,
// bits 2 and 1 the operator kinds, and all-zero an instruction that stops
// folding. The consumer code 4'b0001 is the one implied by the folding
// equations, which test POC[0] of the second instruction for a consumer.
package fold_pkg;

  typedef logic [3:0] poc_t;

  localparam poc_t POC_P  = 4'b1000;  // push constant / load local variable
  localparam poc_t POC_OE = 4'b0100;  // ALU operator, result back to stack
  localparam poc_t POC_OB = 4'b0010;  // conditional branch
  localparam poc_t POC_OC = 4'b0110;  // complex (microcoded) operator
  localparam poc_t POC_OT = 4'b0000;  // terminates folding
  localparam poc_t POC_C  = 4'b0001;  // store into local variable

  // Role of one instruction inside an issued folding group.
  typedef enum logic [1:0] {
    ROLE_NONE    = 2'd0,  // not part of the group
    ROLE_SRC     = 2'd1,  // producer: becomes a source operand
    ROLE_PRIMARY = 2'd2,  // operator: the instruction actually executed
    ROLE_DST     = 2'd3   // consumer: becomes the destination
  } role_e;

  // One operand redirected into the folded instruction.
  typedef struct packed {
    logic        valid;
    logic        is_lv;   // 1: local variable index, 0: immediate constant
    logic [7:0]  opcode;  // the auxiliary instruction it came from
    logic [15:0] value;   // LV index, or constant (sign-extended to 16 bits)
  } operand_t;

  // Opcodes of the variable-length instructions whose length the decode
  // window cannot determine on its own.
  localparam logic [7:0] OPC_TABLESWITCH  = 8'hAA;
  localparam logic [7:0] OPC_LOOKUPSWITCH = 8'hAB;
  localparam logic [7:0] OPC_WIDE         = 8'hC4;
  localparam logic [7:0] OPC_IINC         = 8'h84;

  // True for the operators that fold (O_E, O_B, O_C).
  function automatic logic is_operator(poc_t p);
    return (p == POC_OE) || (p == POC_OB) || (p == POC_OC);
  endfunction

endpackage
