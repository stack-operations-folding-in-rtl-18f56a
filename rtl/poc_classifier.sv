// poc_classifier: Java bytecode opcode -> POC type and instruction length.
//
// Combinational lookup used once per decode slot. The type follows the
// producer / operator / consumer classes of the folding model:
//   P   constants and loads from local variables (aconst_null, iconst_*,
//       lconst_*, fconst_*, dconst_*, bipush, sipush, [ilfda]load[_n]);
//       ldc* reads the constant pool and is therefore complex (O_C),
//   O_E arithmetic, logic, shifts, conversions and compares (iadd..dcmpg),
//   O_B conditional branches (if*, if_icmp*, if_acmp*, ifnull, ifnonnull),
//   O_C array loads/stores, constant pool and field access, invokes,
//       returns, object creation, arraylength, checkcast, instanceof,
//   C   stores into local variables ([ilfda]store[_n]),
//   O_T everything else: nop, stack shuffles (pop, dup*, swap), iinc,
//       goto, jsr, ret, switches, athrow, monitors, wide, multianewarray,
//       invokedynamic and undefined opcodes.
// The POC folding model defines the classes and names examples of each; the
// opcode-by-opcode assignment and the lengths come from the JVM
// specification. len is the instruction length in bytes including the
// opcode; len_var flags tableswitch/lookupswitch/wide, whose length needs
// operand bytes (len then holds the minimum, 1 or 4).
module poc_classifier
  import fold_pkg::*;
(
  input  logic [7:0] opcode,
  output poc_t       poc,
  output logic [2:0] len,      // 1..5 bytes
  output logic       len_var   // length depends on operand bytes
);

  always_comb begin
    poc     = POC_OT;
    len     = 3'd1;
    len_var = 1'b0;

    // ---------------- type ----------------
    if (opcode >= 8'h01 && opcode <= 8'h11)       poc = POC_P;   // consts, bipush, sipush
    else if (opcode >= 8'h12 && opcode <= 8'h14)  poc = POC_OC;  // ldc, ldc_w, ldc2_w
    else if (opcode >= 8'h15 && opcode <= 8'h2D)  poc = POC_P;   // loads
    else if (opcode >= 8'h2E && opcode <= 8'h35)  poc = POC_OC;  // array loads
    else if (opcode >= 8'h36 && opcode <= 8'h4E)  poc = POC_C;   // stores
    else if (opcode >= 8'h4F && opcode <= 8'h56)  poc = POC_OC;  // array stores
    else if (opcode >= 8'h60 && opcode <= 8'h83)  poc = POC_OE;  // arithmetic / logic
    else if (opcode >= 8'h85 && opcode <= 8'h98)  poc = POC_OE;  // conversions, compares
    else if (opcode >= 8'h99 && opcode <= 8'hA6)  poc = POC_OB;  // if*, if_icmp*, if_acmp*
    else if (opcode >= 8'hAC && opcode <= 8'hB9)  poc = POC_OC;  // returns, fields, invokes
    else if (opcode >= 8'hBB && opcode <= 8'hBE)  poc = POC_OC;  // new*, arraylength
    else if (opcode == 8'hC0 || opcode == 8'hC1)  poc = POC_OC;  // checkcast, instanceof
    else if (opcode == 8'hC6 || opcode == 8'hC7)  poc = POC_OB;  // ifnull, ifnonnull

    // ---------------- length ----------------
    unique case (opcode) inside
      8'h10, 8'h12, [8'h15:8'h19], [8'h36:8'h3A], 8'hA9, 8'hBC:
        len = 3'd2;  // bipush, ldc, xload, xstore, ret, newarray
      8'h11, 8'h13, 8'h14, 8'h84, [8'h99:8'hA8], [8'hB2:8'hB8],
      8'hBB, 8'hBD, 8'hC0, 8'hC1, 8'hC6, 8'hC7:
        len = 3'd3;  // sipush, ldc_w, ldc2_w, iinc, branches, fields, invokes, ...
      8'hC5:
        len = 3'd4;  // multianewarray
      8'hB9, 8'hBA, 8'hC8, 8'hC9:
        len = 3'd5;  // invokeinterface, invokedynamic, goto_w, jsr_w
      OPC_TABLESWITCH, OPC_LOOKUPSWITCH: begin
        len = 3'd1; len_var = 1'b1;
      end
      OPC_WIDE: begin
        len = 3'd4; len_var = 1'b1;  // 4, or 6 when it modifies iinc
      end
      default:
        len = 3'd1;
    endcase
  end

endmodule
