// hmsa_bcast_bus: one data broadcast bus of the HMSA array, a horizontal
// bus (HBUS) across a row or a vertical bus (VBUS) down a column.
//
// In one clock the word offered by one PE of the row/column, chosen by that
// row's/column's local control unit (sel), reaches every PE on the bus. This
// is how the diagonal local control units broadcast an operand to a whole
// row (RC-mode) or column (CC-mode) at the same time. The bus is built as a
// multiplexer (no tri-states), which is this design's choice.
//
// Interface: src[k] is the word of the k-th PE on the bus, sel the driving
// PE, bus the value every PE sees. Combinational.
module hmsa_bcast_bus
  import hmsa_pkg::*;
#(
  parameter int unsigned DIM = 8
) (
  input  word_t                   src [DIM],
  input  logic [$clog2(DIM)-1:0]  sel,
  output word_t                   bus
);

  always_comb begin
    bus = '0;
    for (int k = 0; k < DIM; k++)
      if (sel == k[$clog2(DIM)-1:0]) bus = src[k];
  end

endmodule
