// hmsa_pkg: types and constants shared by the HMSA (hierarchical multiple-SIMD
// array) modules.
//
// The array is an N x N grid of processing elements (PEs) driven by N local
// control units (LCUs) on the diagonal, which a global control unit (GCU)
// starts and synchronises. Every LCU fetches one instruction word (instr_t)
// per clock from its control memory (CM). An instruction word carries
//   * one PE operation, executed by every PE of the LCU's row (RC-mode) or
//     column (CC-mode),
//   * an effective address / broadcast offset  imm + (X[xp] << xsh) + X[xq]
//     formed from the LCU's index registers X1..X7 (X0 reads as 0),
//   * one flow field: next, loop, two nested loops closed at once, jump,
//     mode change (a barrier across all LCUs) or halt.
// The operation set (load, store, broadcast, multiply, add, neighbour shift)
// follows the steps of the matrix multiplication the architecture was made
// for; the encoding, the index registers and the loop fields are this
// design's own. Every instruction takes one clock.
package hmsa_pkg;

  // Data word of the PEs (two's complement, arithmetic wraps).
  parameter int unsigned DATA_W = 32;
  // Address widths of the processing memory (PM) and control memory (CM).
  parameter int unsigned PM_AW = 12;
  parameter int unsigned CM_AW = 8;
  // Index registers of an LCU (X0 is constant 0) and their width.
  parameter int unsigned NXR  = 8;
  parameter int unsigned XR_W = 16;
  // Loop count field width.
  parameter int unsigned CNT_W = 12;

  typedef logic [DATA_W-1:0] word_t;

  // PE operations.
  typedef enum logic [3:0] {
    PE_NOP   = 4'd0,
    PE_MOVI  = 4'd1,   // rd <= sign-extended imm
    PE_LD    = 4'd2,   // rd <= PM[addr]
    PE_ST    = 4'd3,   // PM[addr] <= rs
    PE_BCAST = 4'd4,   // selected PE puts rs on HBUS/VBUS, all latch BR
    PE_MUL   = 4'd5,   // rd <= rs * rt
    PE_ADD   = 4'd6,   // rd <= rs + rt
    PE_SUB   = 4'd7,   // rd <= rs - rt
    PE_AND   = 4'd8,
    PE_OR    = 4'd9,
    PE_XOR   = 4'd10,
    PE_MOV   = 4'd11,  // rd <= rs
    PE_SHL   = 4'd12,  // rd <= rs << imm[4:0]
    PE_SHR   = 4'd13,  // rd <= rs >> imm[4:0], imm[5] = arithmetic
    PE_SEND  = 4'd14,  // every PE sends rs towards dir; rd, RR <= word received
    PE_BMUL  = 4'd15   // BCAST overlapped with a multiply: BR <= bus,
                       // rd <= bus * rt, in the same clock
  } pe_op_e;

  // Direction in which a SEND moves data. DIR_N moves every word one PE up,
  // so each PE receives the word of its south neighbour.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_S = 2'd1,
    DIR_E = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Flow field of an instruction.
  typedef enum logic [2:0] {
    FL_NEXT  = 3'd0,
    FL_LOOP  = 3'd1,   // loop A: X[la_x] counts 0..la_cnt-1, back to la_tgt
    FL_LOOP2 = 3'd2,   // loop A, and when it ends, loop B (nested, outer)
    FL_JMP   = 3'd3,   // pc <= la_tgt
    FL_MODE  = 3'd4,   // wait for all LCUs, then switch to mode_cc
    FL_HALT  = 3'd5
  } flow_e;

  // Operand selector: 0..7 general-purpose registers, then the special
  // registers.
  typedef logic [3:0] src_t;
  localparam src_t SRC_BR = 4'd8;   // row/column broadcast register
  localparam src_t SRC_RR = 4'd9;   // receive register (from a neighbour)
  localparam src_t SRC_SR = 4'd10;  // send register (last word sent)

  typedef logic [$clog2(NXR)-1:0] xidx_t;

  typedef struct packed {
    pe_op_e              op;
    logic [2:0]          rd;
    src_t                rs;
    src_t                rt;
    logic [15:0]         imm;
    xidx_t               xp;
    xidx_t               xq;
    logic [3:0]          xsh;
    dir_e                dir;
    flow_e               flow;
    logic                mode_cc;
    xidx_t               la_x;
    logic [CNT_W-1:0]    la_cnt;
    logic [CM_AW-1:0]    la_tgt;
    xidx_t               lb_x;
    logic [CNT_W-1:0]    lb_cnt;
    logic [CM_AW-1:0]    lb_tgt;
  } instr_t;

  // Control an LCU sends to each PE it drives, one per clock.
  typedef struct packed {
    pe_op_e              op;
    logic [2:0]          rd;
    src_t                rs;
    src_t                rt;
    logic [15:0]         imm;
    logic [PM_AW-1:0]    addr;
    dir_e                dir;
  } pe_ctrl_t;

  localparam pe_ctrl_t PE_CTRL_NOP = '{op: PE_NOP, rd: '0, rs: '0, rt: '0,
                                       imm: '0, addr: '0, dir: DIR_N};

endpackage
