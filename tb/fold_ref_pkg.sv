// fold_ref_pkg: independent reference model used by the testbenches.
//
// It restates, in a form different from the RTL, the rules the decoder must
// follow: the instruction class and length of each Java opcode written as
// opcode lists by mnemonic group, the operand each producer/consumer
// carries, and the N-foldable folding rule check as the state machine of
// the folding model (start, State_P, State_O_E, State_O_B, State_O_C,
// State_C, end), walked one instruction at a time.
package fold_ref_pkg;

  typedef enum int { K_P, K_OE, K_OB, K_OC, K_OT, K_C } kind_e;

  // Bit code of each class (producer bit 3, consumer bit 0).
  function automatic logic [3:0] kind_bits(kind_e k);
    case (k)
      K_P:  return 4'b1000;
      K_OE: return 4'b0100;
      K_OB: return 4'b0010;
      K_OC: return 4'b0110;
      K_C:  return 4'b0001;
      default: return 4'b0000;
    endcase
  endfunction

  function automatic kind_e bits_kind(logic [3:0] b);
    for (int k = 0; k < 6; k++)
      if (kind_bits(kind_e'(k)) == b) return kind_e'(k);
    return K_OT;
  endfunction

  function automatic kind_e ref_kind(int op);
    // producers: aconst_null, iconst_m1..5, lconst_0/1, fconst_0..2,
    // dconst_0/1, bipush, sipush, iload..aload, iload_0..aload_3
    if (op inside {[1:17], [21:45]}) return K_P;
    // consumers: istore..astore, istore_0..astore_3
    if (op inside {[54:78]}) return K_C;
    // arithmetic 96..131, conversions 133..147, lcmp..dcmpg 148..152
    if (op inside {[96:131], [133:152]}) return K_OE;
    // ifeq..if_acmpne, ifnull, ifnonnull
    if (op inside {[153:166], 198, 199}) return K_OB;
    // ldc*, xaload, xastore, returns, get/put, invokes (not invokedynamic),
    // new, newarray, anewarray, arraylength, checkcast, instanceof
    if (op inside {[18:20], [46:53], [79:86], [172:185], [187:190], 192, 193})
      return K_OC;
    return K_OT;
  endfunction

  // Instruction length; b1 is the byte after the opcode (for wide).
  // Returns 0 for tableswitch / lookupswitch.
  function automatic int ref_len(int op, int b1);
    if (op == 170 || op == 171) return 0;
    if (op == 196) return (b1 == 132) ? 6 : 4;
    if (op inside {16, 18, [21:25], [54:58], 169, 188}) return 2;
    if (op inside {17, 19, 20, 132, [153:168], [178:184], 187, 189, 192, 193, 198, 199}) return 3;
    if (op == 197) return 4;
    if (op inside {185, 186, 200, 201}) return 5;
    return 1;
  endfunction

  // Folding rule check: number of instructions folded from kinds[0..n-1]
  // under the max-fold limit nmax; also gives the type of the result and
  // which (k+2)-foldable lines are raised.
  typedef enum int { S_START, S_P, S_OE, S_OB, S_OC, S_C, S_END } state_e;

  function automatic state_e step(state_e s, kind_e k);
    if (k == K_OT) return S_END;
    case (s)
      S_START, S_P:
        case (k)
          K_P:  return S_P;
          K_OE: return S_OE;
          K_OB: return S_OB;
          K_OC: return S_OC;
          default: return S_C;
        endcase
      S_OE: return (k == K_C) ? S_OE : S_END;
      S_OC: return (k == K_C) ? S_OC : S_END;
      default: return S_END;
    endcase
  endfunction

  function automatic kind_e state_kind(state_e s);
    case (s)
      S_OE: return K_OE;
      S_OB: return K_OB;
      S_OC: return K_OC;
      S_C:  return K_C;
      default: return K_P;
    endcase
  endfunction

  // lines[j] set when the first j+2 instructions end in a folding state.
  function automatic void ref_fold(input kind_e kinds[], input int nmax,
                                   output int count, output kind_e gkind,
                                   output logic [15:0] lines);
    state_e s = S_START;
    count = 1;
    gkind = kinds[0];
    lines = '0;
    for (int i = 0; i < nmax && i < kinds.size(); i++) begin
      s = step(s, kinds[i]);
      if (s == S_END) break;
      if (i >= 1 && s inside {S_OE, S_OB, S_OC, S_C}) begin
        count = i + 1;
        gkind = state_kind(s);
        lines[i-1] = 1'b1;
      end
    end
  endfunction

  // Operand carried by a producer or consumer: {is_lv, value}.
  function automatic void ref_operand(input int op, input int b1, input int b2,
                                      output bit is_lv, output int value);
    is_lv = 0;
    value = 0;
    if (op == 1)                  value = 0;              // aconst_null
    else if (op inside {[2:8]})   value = op - 3;          // iconst_m1..5
    else if (op inside {9, 10})   value = op - 9;          // lconst
    else if (op inside {[11:13]}) value = op - 11;         // fconst
    else if (op inside {14, 15})  value = op - 14;         // dconst
    else if (op == 16)            value = (b1 >= 128) ? b1 - 256 : b1;
    else if (op == 17)            value = b1 * 256 + b2;
    else if (op inside {[21:25], [54:58]}) begin is_lv = 1; value = b1; end
    else if (op inside {[26:45]}) begin is_lv = 1; value = (op - 26) % 4; end
    else if (op inside {[59:78]}) begin is_lv = 1; value = (op - 59) % 4; end
  endfunction

endpackage
