// folding_logic: scalable N-foldable folding logic.
//
// N_FOLD-1 folding units are cascaded. The first unit sees the types of
// instructions 0 and 1 with its continue input tied high; unit k sees the
// combined type and continue line of unit k-1 together with the type of
// instruction k+1. The foldable line of unit k says that instructions
// 0..k+1 form a folding group, i.e. the group is (k+2)-foldable. Because
// every unit's outputs are gated by the continue chain, the largest
// asserted line gives the group size; fold_count is 1 when no line is
// asserted (the first instruction is issued alone). group_poc is the type
// of the folded instruction: that of the primary operator, P for a lone
// producer, C for a producer-consumer move with a null primary.
// Combinational; the delay grows linearly with N_FOLD. N_FOLD = 4 is the
// 4-foldable strategy; any N_FOLD >= 2 elaborates.
module folding_logic
  import fold_pkg::*;
#(
  parameter int unsigned N_FOLD = 4,
  localparam int unsigned CW = $clog2(N_FOLD + 1)
) (
  input  poc_t              poc      [N_FOLD],   // types of instructions 0..N_FOLD-1
  output logic [N_FOLD-2:0] k_foldable,          // bit k: (k+2)-foldable line
  output logic [CW-1:0]     fold_count,          // 1..N_FOLD instructions in group
  output poc_t              group_poc            // type of the folded instruction
);

  poc_t comb [N_FOLD];   // comb[k]: folded type of instructions 0..k
  logic cont [N_FOLD];   // cont[k]: instructions 0..k may fold further

  assign comb[0] = poc[0];
  assign cont[0] = 1'b1;  // first unit's continue input is tied high

  for (genvar k = 0; k < N_FOLD - 1; k++) begin : g_unit
    folding_unit u_unit (
      .poc_n   (comb[k]),
      .poc_n1  (poc[k+1]),
      .cont_in (cont[k]),
      .foldable(k_foldable[k]),
      .poc_comb(comb[k+1]),
      .cont_out(cont[k+1])
    );
  end

  always_comb begin
    fold_count = CW'(1);
    group_poc  = poc[0];
    for (int k = 0; k < N_FOLD - 1; k++) begin
      if (k_foldable[k]) begin
        fold_count = CW'(k + 2);
        group_poc  = comb[k+1];
      end
    end
  end

endmodule
