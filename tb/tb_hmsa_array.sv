// tb_hmsa_array: self-checking test of the PE array and its interconnect
// (4 x 4), with the local control units replaced by stimuli. It checks
//   - control distribution: PE(i,j) obeys LCU i in RC-mode, LCU j in CC-mode,
//   - HBUS broadcast in RC-mode and VBUS broadcast in CC-mode from a
//     different source PE in every row/column at the same time,
//   - neighbour shifts in all four directions with torus wrap-around,
//   - host access to every PE memory.
// Results are stored by the PEs and read back through the host port.
module tb_hmsa_array;
  import hmsa_pkg::*;
  localparam int DIM = 4;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic mode_cc;
  pe_ctrl_t lcu_ctrl [DIM];
  logic [1:0] lcu_bsel [DIM];
  logic hp_we [DIM][DIM];
  logic [PM_AW-1:0] hp_addr;
  word_t hp_wdata;
  word_t hp_rdata [DIM][DIM];
  word_t v [DIM][DIM];

  hmsa_array #(.DIM(DIM), .PM_DEPTH(64)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pe_ctrl_t op(pe_op_e o, int rd, int rs, int addr, int imm = 0, dir_e dir = DIR_N);
    pe_ctrl_t c;
    c = PE_CTRL_NOP;
    c.op = o; c.rd = 3'(rd); c.rs = src_t'(rs); c.addr = PM_AW'(addr); c.imm = 16'(imm); c.dir = dir;
    return c;
  endfunction

  // Every LCU issues the same operation for one clock.
  task automatic all(input pe_ctrl_t c);
    for (int k = 0; k < DIM; k++) lcu_ctrl[k] = c;
    @(posedge clk); #1;
    for (int k = 0; k < DIM; k++) lcu_ctrl[k] = PE_CTRL_NOP;
  endtask

  function automatic int md(int a); return (a % DIM + DIM) % DIM; endfunction

  // Read word addr of every PE and compare with exp(i,j) given by kind.
  task automatic check_mem(input int addr, input int kind, input string what);
    word_t e;
    hp_addr = PM_AW'(addr);
    @(posedge clk); #1;
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        case (kind)
          0: e = v[i][lcu_bsel[i]];         // HBUS
          1: e = v[lcu_bsel[j]][j];         // VBUS
          2: e = v[md(i + 1)][j];           // moved north
          3: e = v[md(i - 1)][j];           // moved south
          4: e = v[i][md(j - 1)];           // moved east
          5: e = v[i][md(j + 1)];           // moved west
          6: e = word_t'(100 + i);          // row control
          default: e = word_t'(200 + j);    // column control
        endcase
        checks++;
        if (hp_rdata[i][j] !== e) begin
          failures++;
          if (failures < 20) $display("%s: PE(%0d,%0d) %h expected %h", what, i, j, hp_rdata[i][j], e);
        end
      end
  endtask

  initial begin
    mode_cc = 0; hp_addr = 0; hp_wdata = 0;
    for (int k = 0; k < DIM; k++) begin lcu_ctrl[k] = PE_CTRL_NOP; lcu_bsel[k] = 0; end
    for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++) hp_we[i][j] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // host loads v into word 0 of every PE
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        v[i][j] = $urandom;
        hp_we[i][j] = 1; hp_addr = 0; hp_wdata = v[i][j];
        @(posedge clk); #1;
        hp_we[i][j] = 0;
      end
    for (int rep = 0; rep < 4; rep++) begin
      all(op(PE_LD, 0, 0, 0));
      // RC-mode broadcast, each row from its own column
      mode_cc = 0;
      for (int k = 0; k < DIM; k++) lcu_bsel[k] = 2'(md(k + rep));
      all(op(PE_BCAST, 0, 0, 0));
      all(op(PE_ST, 0, SRC_BR, 1));
      check_mem(1, 0, "HBUS broadcast");
      // CC-mode broadcast, each column from its own row
      mode_cc = 1;
      for (int k = 0; k < DIM; k++) lcu_bsel[k] = 2'($urandom);
      all(op(PE_BCAST, 0, 0, 0));
      all(op(PE_ST, 0, SRC_BR, 1));
      check_mem(1, 1, "VBUS broadcast");
      mode_cc = rep[0];
      // neighbour shifts
      for (int d = 0; d < 4; d++) begin
        all(op(PE_SEND, 1, 0, 0, 0, dir_e'(d)));
        all(op(PE_ST, 0, 1, 2));
        check_mem(2, 2 + d, "shift to neighbour (register)");
        all(op(PE_ST, 0, SRC_RR, 3));
        check_mem(3, 2 + d, "shift to neighbour (RR)");
      end
    end
    // row control in RC-mode, column control in CC-mode
    mode_cc = 0;
    for (int k = 0; k < DIM; k++) lcu_ctrl[k] = op(PE_MOVI, 4, 0, 0, 100 + k);
    @(posedge clk); #1;
    all(op(PE_ST, 0, 4, 4));
    check_mem(4, 6, "RC-mode: PE obeys the LCU of its row");
    mode_cc = 1;
    for (int k = 0; k < DIM; k++) lcu_ctrl[k] = op(PE_MOVI, 4, 0, 0, 200 + k);
    @(posedge clk); #1;
    all(op(PE_ST, 0, 4, 4));
    check_mem(4, 7, "CC-mode: PE obeys the LCU of its column");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
