// hmsa_gcu: global control unit of the HMSA.
//
// The GCU sits above the DIM diagonal local control units (LCUs). It
//   * is the host interface: it writes instruction words into one LCU's
//     control memory or into all of them at once (cm_all), and it decodes
//     host accesses to the PE memories (pm_row/pm_col select one PE; the
//     read word comes back one clock after the address),
//   * starts all LCUs in the same clock (start -> lcu_start) and reports
//     completion: done pulses for one clock when every LCU has halted;
//     cycles counts the clocks from start to that point,
//   * synchronises the LCUs and holds the control mode: mode_cc = 0 is
//     RC-mode (each LCU drives its row), 1 is CC-mode (each LCU drives its
//     column). An LCU that meets a mode change waits with lcu_mode_req
//     high; in the clock in which all of them wait, lcu_go is raised and the
//     mode register takes the requested mode. The mode is RC after reset and
//     at every start.
// The GCU's duties are the architecture's; this barrier, the start/done
// handshake and the cycle counter are this design's way of providing them.
module hmsa_gcu
  import hmsa_pkg::*;
#(
  parameter int unsigned DIM = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host: run control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic [31:0]             cycles,
  output logic                    mode_cc,
  // host: control memory writes
  input  logic                    cm_we,
  input  logic                    cm_all,
  input  logic [$clog2(DIM)-1:0]  cm_sel,
  output logic [DIM-1:0]          lcu_cm_we,
  // host: PE memory access
  input  logic                    pm_we,
  input  logic [$clog2(DIM)-1:0]  pm_row,
  input  logic [$clog2(DIM)-1:0]  pm_col,
  output logic                    pe_hp_we [DIM][DIM],
  input  word_t                   pe_hp_rdata [DIM][DIM],
  output word_t                   pm_rdata,
  // local control units
  output logic                    lcu_start,
  output logic                    lcu_go,
  input  logic [DIM-1:0]          lcu_mode_req,
  input  logic [DIM-1:0]          lcu_mode_val,
  input  logic [DIM-1:0]          lcu_halted
);

  logic                   busy_q;
  logic [$clog2(DIM)-1:0] rd_row_q, rd_col_q;

  assign busy      = busy_q;
  assign lcu_start = start && !busy_q;
  assign lcu_go    = &lcu_mode_req;
  assign done      = busy_q && (&lcu_halted);

  always_comb begin
    for (int k = 0; k < DIM; k++)
      lcu_cm_we[k] = cm_we && (cm_all || cm_sel == k[$clog2(DIM)-1:0]);
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++)
        pe_hp_we[r][c] = pm_we && pm_row == r[$clog2(DIM)-1:0]
                               && pm_col == c[$clog2(DIM)-1:0];
  end

  assign pm_rdata = pe_hp_rdata[rd_row_q][rd_col_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      mode_cc  <= 1'b0;
      cycles   <= '0;
      rd_row_q <= '0;
      rd_col_q <= '0;
    end else begin
      rd_row_q <= pm_row;
      rd_col_q <= pm_col;
      if (lcu_start) begin
        busy_q  <= 1'b1;
        mode_cc <= 1'b0;
        cycles  <= '0;
      end else if (busy_q) begin
        if (done) busy_q <= 1'b0;
        else      cycles <= cycles + 1'b1;
        if (lcu_go) mode_cc <= lcu_mode_val[0];
      end
    end
  end

  // All LCUs meeting at a mode change must ask for the same mode; LCUs
  // only wait at a barrier or halt during a run.
  always_ff @(posedge clk) begin
    if (rst_n && lcu_go)
      assert (lcu_mode_val == '0 || lcu_mode_val == '1)
        else $error("local control units request different modes");
    if (rst_n && !busy_q)
      assert (lcu_mode_req == '0)
        else $error("local control unit waits at a barrier outside a run");
  end

endmodule
