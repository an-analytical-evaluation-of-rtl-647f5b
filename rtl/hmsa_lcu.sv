// hmsa_lcu: local control unit of the HMSA, one of DIM placed on the
// diagonal of the PE array (LCU IDX sits at PE(IDX,IDX)).
//
// It runs its own program from its control memory (hmsa_cm), one
// instruction per clock, and drives the PEs of row IDX in RC-mode or of
// column IDX in CC-mode (the array does the routing). For every
// instruction it forms
//     ea = imm + (X[xp] << xsh) + X[xq]
// from its index registers X1..X7 (X0 reads 0). ea is the PM address of a
// load or store, and for BCAST the offset of the diagonally indexed
// broadcast: the driving PE of its row/column is bsel = (IDX + ea) mod DIM,
// so all rows broadcast concurrently, each from its own column
// (IDX + k) mod DIM. Index registers are loop counters: FL_LOOP counts
// X[la_x] from 0 to la_cnt-1, jumping back to la_tgt, and clears it when
// the loop ends; FL_LOOP2 does the same and, at the end of that loop, steps
// a second (outer) loop X[lb_x]/lb_cnt/lb_tgt, so closing nested loops costs
// no clock. FL_MODE waits (issuing NOPs, mode_req high) until the global
// control unit raises go, which it does in the clock in which every LCU has
// reached its FL_MODE; the GCU then switches the mode. FL_HALT stops the LCU
// (halted high) until the next start. The instruction set is this design's
// own; the diagonal placement, the broadcast index (x + k) mod sqrt(P) and
// the row/column control follow the architecture.
//
// Timing: start (one clock) resets pc and index registers; the instruction
// at pc is issued combinationally on ctrl in the same clock it is fetched.
module hmsa_lcu
  import hmsa_pkg::*;
#(
  parameter int unsigned DIM      = 8,
  parameter int unsigned CM_DEPTH = 64,
  parameter int unsigned IDX      = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    go,
  input  logic                    cm_we,
  input  logic [CM_AW-1:0]        cm_addr,
  input  instr_t                  cm_wdata,
  output pe_ctrl_t                ctrl,
  output logic [$clog2(DIM)-1:0]  bsel,
  output logic                    mode_req,
  output logic                    mode_val,
  output logic                    halted
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_HALT} state_e;

  state_e           state_q;
  logic [CM_AW-1:0] pc_q, pc_d;
  logic [XR_W-1:0]  x_q [NXR];
  logic [XR_W-1:0]  x_d [NXR];
  instr_t           ir;
  logic [XR_W-1:0]  ea;
  logic             issue;

  hmsa_cm #(.CM_DEPTH(CM_DEPTH)) u_cm (
    .clk, .we(cm_we), .waddr(cm_addr), .wdata(cm_wdata), .raddr(pc_q), .rdata(ir)
  );

  assign issue = (state_q == S_RUN);
  assign ea    = ir.imm + (x_q[ir.xp] << ir.xsh) + x_q[ir.xq];
  assign bsel  = $clog2(DIM)'((XR_W'(IDX) + ea) % XR_W'(DIM));

  assign halted   = (state_q == S_HALT);
  assign mode_req = issue && (ir.flow == FL_MODE);
  assign mode_val = ir.mode_cc;

  // PE control: the decoded instruction while running, NOP otherwise and
  // during a mode change.
  always_comb begin
    ctrl = PE_CTRL_NOP;
    if (issue && ir.flow != FL_MODE && ir.flow != FL_HALT) begin
      ctrl.op   = ir.op;
      ctrl.rd   = ir.rd;
      ctrl.rs   = ir.rs;
      ctrl.rt   = ir.rt;
      ctrl.imm  = ir.imm;
      ctrl.addr = ea[PM_AW-1:0];
      ctrl.dir  = ir.dir;
    end
  end

  // Sequencing and loop counters.
  always_comb begin
    pc_d = pc_q + 1'b1;
    for (int r = 0; r < NXR; r++) x_d[r] = x_q[r];
    unique case (ir.flow)
      FL_LOOP, FL_LOOP2: begin
        if (XR_W'(x_q[ir.la_x]) + 1 < XR_W'(ir.la_cnt)) begin
          x_d[ir.la_x] = x_q[ir.la_x] + 1'b1;
          pc_d         = ir.la_tgt;
        end else begin
          x_d[ir.la_x] = '0;
          if (ir.flow == FL_LOOP2) begin
            if (XR_W'(x_q[ir.lb_x]) + 1 < XR_W'(ir.lb_cnt)) begin
              x_d[ir.lb_x] = x_q[ir.lb_x] + 1'b1;
              pc_d         = ir.lb_tgt;
            end else begin
              x_d[ir.lb_x] = '0;
            end
          end
        end
      end
      FL_JMP:  pc_d = ir.la_tgt;
      FL_MODE: if (!go) pc_d = pc_q;
      default: ;
    endcase
    x_d[0] = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pc_q    <= '0;
      for (int r = 0; r < NXR; r++) x_q[r] <= '0;
    end else if (start) begin
      state_q <= S_RUN;
      pc_q    <= '0;
      for (int r = 0; r < NXR; r++) x_q[r] <= '0;
    end else if (issue) begin
      if (ir.flow == FL_HALT) begin
        state_q <= S_HALT;
      end else begin
        pc_q <= pc_d;
        for (int r = 0; r < NXR; r++) x_q[r] <= x_d[r];
      end
    end
  end

  // Program rules: a loop runs at least once, and the broadcast source lies
  // inside the row/column.
  always_ff @(posedge clk) begin
    if (rst_n && issue) begin
      assert ((ir.flow != FL_LOOP && ir.flow != FL_LOOP2) || ir.la_cnt != '0)
        else $error("LCU %0d: loop A with count 0 at %0d", IDX, pc_q);
      assert (ir.flow != FL_LOOP2 || ir.lb_cnt != '0)
        else $error("LCU %0d: loop B with count 0 at %0d", IDX, pc_q);
      assert (int'(bsel) < DIM)
        else $error("LCU %0d: broadcast source out of range", IDX);
    end
  end

endmodule
