// tb_hmsa_lcu: self-checking test of a local control unit (placed at
// diagonal position IDX = 1 of a 4 x 4 array). It runs the blocked matrix
// product programs (2 x 2 blocks) from the control memory and compares the
// operation, PM address and broadcast source it issues every clock with a
// trace built here from the nested loops of the algorithm; it holds the
// barrier release (go) low for a few clocks at a mode change and checks
// that the unit waits, and it checks halting and the clock count.
module tb_hmsa_lcu;
  import hmsa_pkg::*;
  import hmsa_tb_pkg::*;
  localparam int DIM = 4, IDX = 1, S = 2;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic start, go, cm_we;
  logic [CM_AW-1:0] cm_addr;
  instr_t cm_wdata;
  pe_ctrl_t ctrl;
  logic [1:0] bsel;
  logic mode_req, mode_val, halted;

  hmsa_lcu #(.DIM(DIM), .CM_DEPTH(64), .IDX(IDX)) dut (
    .clk, .rst_n, .start, .go, .cm_we, .cm_addr, .cm_wdata,
    .ctrl, .bsel, .mode_req, .mode_val, .halted);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { pe_op_e op; int addr; int bsel; } exp_t;
  exp_t q [$];

  function automatic void push(pe_op_e op, int addr, int bs);
    exp_t e;
    e.op = op; e.addr = addr; e.bsel = bs;
    q.push_back(e);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic run(input bit cc);
    instr_t prog [64];
    int len, cyc, waits;
    matmul_prog(cc, DIM, S, prog, len);
    for (int k = 0; k < len; k++) begin
      cm_we = 1; cm_addr = CM_AW'(k); cm_wdata = prog[k];
      @(posedge clk); #1;
    end
    cm_we = 0;
    // expected trace
    q.delete();
    for (int i = 0; i < S; i++)
      for (int j = 0; j < S; j++) begin
        push(PE_MOVI, -1, -1);
        for (int k = 0; k < S; k++) begin
          push(PE_LD, cc ? k * S + j : i * S + k, -1);
          push(PE_LD, cc ? S * S + i * S + k : S * S + k * S + j, -1);
          for (int kp = 0; kp < DIM; kp++) begin
            push(PE_BCAST, -1, (IDX + kp) % DIM);
            push(PE_MUL, -1, -1);
            push(PE_ADD, -1, -1);
            push(PE_SEND, -1, -1);
          end
        end
        push(PE_ST, 2 * S * S + i * S + j, -1);
      end
    start = 1; @(posedge clk); #1 start = 0;
    cyc = 0; waits = 0;
    if (cc) begin
      // first instruction is a mode change: hold the barrier for 3 clocks
      for (int w = 0; w < 3; w++) begin
        check(mode_req && mode_val && ctrl.op == PE_NOP, "waits at mode change");
        @(posedge clk); #1; cyc++; waits++;
      end
      go = 1;
      check(mode_req, "still waiting when released");
      @(posedge clk); #1; cyc++;
      go = 0;
    end
    while (q.size() > 0) begin
      exp_t e;
      e = q.pop_front();
      check(ctrl.op == e.op, $sformatf("op %s expected %s", ctrl.op.name(), e.op.name()));
      if (e.addr >= 0) check(int'(ctrl.addr) == e.addr, $sformatf("addr %0d expected %0d", ctrl.addr, e.addr));
      if (e.bsel >= 0) check(int'(bsel) == e.bsel, $sformatf("bsel %0d expected %0d", bsel, e.bsel));
      check(!mode_req && !halted, "no mode request or halt inside the product");
      @(posedge clk); #1; cyc++;
    end
    if (cc) begin
      go = 1;
      check(mode_req && !mode_val, "mode change back to RC");
      @(posedge clk); #1; cyc++;
      go = 0;
    end
    check(!halted, "not halted before HALT");
    @(posedge clk); #1; cyc++;
    check(halted && ctrl.op == PE_NOP, "halted after HALT");
    check(longint'(cyc) == matmul_cycles(cc, DIM, S) + waits,
          $sformatf("program took %0d clocks, expected %0d", cyc, matmul_cycles(cc, DIM, S) + waits));
    repeat (3) @(posedge clk);
    #1 check(halted, "stays halted");
  endtask

  initial begin
    start = 0; go = 0; cm_we = 0; cm_addr = 0; cm_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!halted && ctrl.op == PE_NOP, "idle after reset");
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
