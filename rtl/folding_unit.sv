// folding_unit: the basic 2-fold unit of the POC folding model.
//
// It compares the type of instruction N (an original instruction, or the
// result of folding earlier instructions) with the type of instruction N+1
// and produces three results, all purely combinational:
//   foldable  - N and N+1 are truly data dependent and fold together
//               (P followed by O_E/O_B/O_C or C; O_E or O_C followed by C),
//   poc_comb  - type of the combined instruction: POC of N+1 when N is a
//               producer and N+1 is not O_T, otherwise POC of N,
//   cont_out  - the combined instruction may be checked against the next
//               instruction (P followed by P/O, or O_E/O_C followed by C).
// Both outputs are gated by cont_in, the continue line of the previous unit.
// The two Boolean equations and the multiplexer rule are those of the POC
// folding model. P followed by P is not foldable but keeps the check going,
// so a run of producers can feed one operator. Written as sum-of-products; the choice
// of inverting gates is left to synthesis.
module folding_unit
  import fold_pkg::*;
(
  input  poc_t poc_n,     // type of instruction N (or folded result)
  input  poc_t poc_n1,    // type of instruction N+1
  input  logic cont_in,   // previous unit says folding may continue
  output logic foldable,  // N and N+1 form (part of) a folding group
  output poc_t poc_comb,  // type of the combined instruction
  output logic cont_out   // result may fold with instruction N+2
);

  always_comb begin
    foldable = ((poc_n[3] & (poc_n1[1] | poc_n1[2])) |
                (poc_n1[0] & (poc_n[3] | poc_n[2]))) & cont_in;

    cont_out = ((poc_n[3] & (poc_n1[3] | poc_n1[2] | poc_n1[1])) |
                (poc_n1[0] & poc_n[2])) & cont_in;

    // POC_OT is all zeros, so "N+1 is not O_T" is the OR of its bits.
    poc_comb = (poc_n[3] & (|poc_n1)) ? poc_n1 : poc_n;
  end

endmodule
