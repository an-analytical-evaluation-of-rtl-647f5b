// hmsa_top: hierarchical multiple-SIMD array (HMSA) for parallel matrix
// multiplication.
//
// A global control unit (hmsa_gcu) controls DIM local control units
// (hmsa_lcu) placed on the diagonal of a DIM x DIM array of processing
// elements (hmsa_array). Each LCU runs the program in its control memory
// and drives its row of PEs (RC-mode) or its column (CC-mode); the GCU
// switches between the modes when all LCUs ask for it. Rows (columns)
// broadcast concurrently over their HBUS (VBUS), each from the PE the LCU
// picks by diagonal index, and PEs exchange words with their four torus
// neighbours.
//
// Use: write programs with cm_we (cm_all = 1 writes every LCU's CM), load
// operands into the PE memories with pm_we/pm_row/pm_col/pm_addr/pm_wdata,
// pulse start, wait for done, read results with pm_row/pm_col/pm_addr
// (pm_rdata one clock later). cycles gives the clocks of the last run.
// One instruction per clock. The structure is the architecture's; the
// host interface is this design's.
module hmsa_top
  import hmsa_pkg::*;
#(
  parameter int unsigned DIM      = 8,
  parameter int unsigned PM_DEPTH = 4096,
  parameter int unsigned CM_DEPTH = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic [31:0]             cycles,
  output logic                    mode_cc,
  input  logic                    cm_we,
  input  logic                    cm_all,
  input  logic [$clog2(DIM)-1:0]  cm_sel,
  input  logic [CM_AW-1:0]        cm_addr,
  input  instr_t                  cm_wdata,
  input  logic                    pm_we,
  input  logic [$clog2(DIM)-1:0]  pm_row,
  input  logic [$clog2(DIM)-1:0]  pm_col,
  input  logic [PM_AW-1:0]        pm_addr,
  input  word_t                   pm_wdata,
  output word_t                   pm_rdata
);

  logic [DIM-1:0]         lcu_cm_we;
  logic                   lcu_start, lcu_go;
  logic [DIM-1:0]         lcu_mode_req, lcu_mode_val, lcu_halted;
  pe_ctrl_t               lcu_ctrl [DIM];
  logic [$clog2(DIM)-1:0] lcu_bsel [DIM];
  logic                   pe_hp_we    [DIM][DIM];
  word_t                  pe_hp_rdata [DIM][DIM];

  hmsa_gcu #(.DIM(DIM)) u_gcu (
    .clk, .rst_n,
    .start, .busy, .done, .cycles, .mode_cc,
    .cm_we, .cm_all, .cm_sel, .lcu_cm_we,
    .pm_we, .pm_row, .pm_col, .pe_hp_we, .pe_hp_rdata, .pm_rdata,
    .lcu_start, .lcu_go, .lcu_mode_req, .lcu_mode_val, .lcu_halted
  );

  for (genvar k = 0; k < DIM; k++) begin : g_lcu
    hmsa_lcu #(.DIM(DIM), .CM_DEPTH(CM_DEPTH), .IDX(k)) u_lcu (
      .clk, .rst_n,
      .start(lcu_start), .go(lcu_go),
      .cm_we(lcu_cm_we[k]), .cm_addr, .cm_wdata,
      .ctrl(lcu_ctrl[k]), .bsel(lcu_bsel[k]),
      .mode_req(lcu_mode_req[k]), .mode_val(lcu_mode_val[k]),
      .halted(lcu_halted[k])
    );
  end

  hmsa_array #(.DIM(DIM), .PM_DEPTH(PM_DEPTH)) u_array (
    .clk, .rst_n, .mode_cc,
    .lcu_ctrl, .lcu_bsel,
    .hp_we(pe_hp_we), .hp_addr(pm_addr), .hp_wdata(pm_wdata),
    .hp_rdata(pe_hp_rdata)
  );

endmodule
