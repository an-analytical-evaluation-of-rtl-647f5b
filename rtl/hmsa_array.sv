// hmsa_array: the DIM x DIM processing element array of the HMSA with its
// interconnect.
//
//   * Control distribution: PE(i,j) executes the operation of local control
//     unit i in RC-mode (mode_cc = 0) and of local control unit j in CC-mode,
//     so one LCU on the diagonal drives a whole row or a whole column.
//   * Broadcast buses: one HBUS per row and one VBUS per column
//     (hmsa_bcast_bus). HBUS i carries the word of PE(i, bsel_i) and VBUS j
//     that of PE(bsel_j, j), where bsel is chosen by the LCU that drives the
//     row/column. A PE latches HBUS of its row in RC-mode and VBUS of its
//     column in CC-mode.
//   * Local buses: a mesh with torus wrap-around, each PE linked to its
//     four neighbours; row 0's north neighbour is row DIM-1, column 0's west
//     neighbour is column DIM-1.
// All of this is the architecture's; only the multiplexer realisation of the
// buses is this design's. Combinational between the LCUs and the PEs; all
// state is in the PEs.
//
// Interface: hp_* are the host ports (port B) of the PE memories, hp_we
// one per PE, address and write data shared.
module hmsa_array
  import hmsa_pkg::*;
#(
  parameter int unsigned DIM      = 8,
  parameter int unsigned PM_DEPTH = 4096
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mode_cc,
  input  pe_ctrl_t                lcu_ctrl [DIM],
  input  logic [$clog2(DIM)-1:0]  lcu_bsel [DIM],
  input  logic                    hp_we    [DIM][DIM],
  input  logic [PM_AW-1:0]        hp_addr,
  input  word_t                   hp_wdata,
  output word_t                   hp_rdata [DIM][DIM]
);

  word_t bout  [DIM][DIM];   // broadcast offers, [row][col]
  word_t bcol  [DIM][DIM];   // the same, [col][row]
  word_t sout  [DIM][DIM];   // words sent to the neighbours
  word_t hbus  [DIM];
  word_t vbus  [DIM];

  for (genvar i = 0; i < DIM; i++) begin : g_bus
    for (genvar j = 0; j < DIM; j++) begin : g_t
      assign bcol[i][j] = bout[j][i];
    end
    hmsa_bcast_bus #(.DIM(DIM)) u_hbus (.src(bout[i]), .sel(lcu_bsel[i]), .bus(hbus[i]));
    hmsa_bcast_bus #(.DIM(DIM)) u_vbus (.src(bcol[i]), .sel(lcu_bsel[i]), .bus(vbus[i]));
  end

  for (genvar i = 0; i < DIM; i++) begin : g_row
    for (genvar j = 0; j < DIM; j++) begin : g_col
      localparam int unsigned IN = (i + DIM - 1) % DIM;  // north
      localparam int unsigned IS = (i + 1) % DIM;        // south
      localparam int unsigned JE = (j + 1) % DIM;        // east
      localparam int unsigned JW = (j + DIM - 1) % DIM;  // west
      word_t nbr [4];
      assign nbr[DIR_N] = sout[IN][j];
      assign nbr[DIR_S] = sout[IS][j];
      assign nbr[DIR_E] = sout[i][JE];
      assign nbr[DIR_W] = sout[i][JW];

      hmsa_pe #(.PM_DEPTH(PM_DEPTH)) u_pe (
        .clk, .rst_n,
        .ctrl(mode_cc ? lcu_ctrl[j] : lcu_ctrl[i]),
        .bus_in(mode_cc ? vbus[j] : hbus[i]),
        .bcast_out(bout[i][j]),
        .send_out(sout[i][j]),
        .nbr_in(nbr),
        .hp_we(hp_we[i][j]), .hp_addr(hp_addr), .hp_wdata(hp_wdata),
        .hp_rdata(hp_rdata[i][j])
      );
    end
  end

endmodule
