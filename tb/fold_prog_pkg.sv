// fold_prog_pkg: random bytecode generator for the decoder testbenches.
//
// Instructions are drawn from a mix weighted towards the stack traffic the
// folding decoder targets (constants, loads, ALU operations, stores,
// branches, field access and invokes), with some terminating instructions
// (iinc, goto, wide, athrow, nop) mixed in. Operand bytes are random.
package fold_prog_pkg;

  // Append one random instruction to prog; returns its length.
  function automatic int gen_instr(ref byte unsigned prog[$], input bit allow_switch);
    int unsigned r = $urandom_range(0, 99);
    byte unsigned op;
    int n;
    if (r < 12)       op = 8'($urandom_range(2, 8));        // iconst_*
    else if (r < 18)  op = 8'h10;                            // bipush
    else if (r < 21)  op = 8'h11;                            // sipush
    else if (r < 30)  op = 8'($urandom_range(21, 25));       // xload idx
    else if (r < 40)  op = 8'($urandom_range(26, 45));       // xload_n
    else if (r < 50)  op = 8'($urandom_range(96, 131));      // ALU
    else if (r < 55)  op = 8'($urandom_range(133, 152));     // conv / cmp
    else if (r < 61)  op = 8'($urandom_range(54, 58));       // xstore idx
    else if (r < 69)  op = 8'($urandom_range(59, 78));       // xstore_n
    else if (r < 75)  op = 8'($urandom_range(153, 166));     // if*
    else if (r < 80)  op = 8'($urandom_range(178, 184));     // fields, invokes
    else if (r < 83)  op = 8'($urandom_range(46, 53));       // array load
    else if (r < 85)  op = 8'hB9;                            // invokeinterface
    else if (r < 87)  op = 8'h84;                            // iinc
    else if (r < 89)  op = 8'hA7;                            // goto
    else if (r < 91)  op = 8'hC4;                            // wide
    else if (r < 93)  op = 8'h00;                            // nop
    else if (r < 95)  op = 8'h59;                            // dup
    else if (r < 97)  op = 8'h12;                            // ldc
    else if (r < 98 && allow_switch) op = 8'hAA;             // tableswitch
    else              op = 8'hAC;                            // ireturn
    prog.push_back(op);
    if (op == 8'hC4) begin
      if ($urandom_range(0, 1)) begin
        prog.push_back(8'h84); n = 6;
      end else begin
        prog.push_back(8'($urandom_range(21, 25))); n = 4;
      end
      for (int i = 2; i < n; i++) prog.push_back(8'($urandom));
      return n;
    end
    if (op == 8'hAA) begin
      // stand-in switch body: 7 operand bytes, length known only to the TB
      for (int i = 0; i < 7; i++) prog.push_back(8'($urandom));
      return 8;
    end
    n = fold_ref_pkg::ref_len(op, 0);
    for (int i = 1; i < n; i++) prog.push_back(8'($urandom));
    return n;
  endfunction

endpackage
