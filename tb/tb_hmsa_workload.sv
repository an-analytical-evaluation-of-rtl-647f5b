// tb_hmsa_workload: the product sizes of the evaluation that fit the
// default array (8 x 8 PEs, 4096-word PE memories): a 4 x 4 example
// product zero-padded to 8 x 8, and C = A x B for N = 64,
// 128 and 256 in RC-mode, i.e. 8, 16 and 32 blocks per PE side. Each result
// is compared with a reference computed here and each run's clock count with
// the step count of the algorithm, s^2 * (s * (2 + 4*DIM) + 1) for
// s = N/DIM, plus one accumulator clear per result block and the HALT.
module tb_hmsa_workload;
  import hmsa_pkg::*;
  import hmsa_tb_pkg::*;
  localparam int DIM = 8;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic start, busy, done, mode_cc, cm_we, cm_all, pm_we;
  logic [31:0] cycles;
  logic [2:0] cm_sel, pm_row, pm_col;
  logic [CM_AW-1:0] cm_addr;
  instr_t cm_wdata;
  logic [PM_AW-1:0] pm_addr;
  word_t pm_wdata, pm_rdata;

  hmsa_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int A [], B [], C [];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic cm_write(input int sel, input bit to_all, input int addr, input instr_t w);
    cm_we = 1; cm_all = to_all; cm_sel = 3'(sel); cm_addr = CM_AW'(addr); cm_wdata = w;
    @(posedge clk); #1;
    cm_we = 0;
  endtask

  task automatic pm_put(input int gr, input int gc, input int base, input int s, input int val);
    pm_we = 1; pm_row = 3'(gr % DIM); pm_col = 3'(gc % DIM);
    pm_addr = PM_AW'(base + (gr / DIM) * s + gc / DIM); pm_wdata = val;
    @(posedge clk); #1;
    pm_we = 0;
  endtask

  task automatic pm_get(input int r, input int c, input int addr, output int val);
    pm_row = 3'(r); pm_col = 3'(c); pm_addr = PM_AW'(addr);
    @(posedge clk); #1;
    val = pm_rdata;
  endtask

  task automatic run_and_wait(output int clocks);
    start = 1; @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1; end
    clocks = cycles;
    @(posedge clk); #1;
  endtask

  // One product of N x N matrices: cc = 0 gives C = A x B, cc = 1 C = B x A.
  task automatic matmul(input bit cc, input int N);
    instr_t prog [64];
    int len, s, clocks, got, bad;
    s = N / DIM;
    matmul_prog(cc, DIM, s, prog, len);
    for (int k = 0; k < len; k++) cm_write(0, 1'b1, k, prog[k]);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        pm_put(r, c, 0, s, A[r * N + c]);
        pm_put(r, c, s * s, s, B[r * N + c]);
      end
    // reference
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int acc;
        acc = 0;
        for (int m = 0; m < N; m++)
          acc += cc ? B[r * N + m] * A[m * N + c] : A[r * N + m] * B[m * N + c];
        C[r * N + c] = acc;
      end
    run_and_wait(clocks);
    check(longint'(clocks) == matmul_cycles(cc, DIM, s),
          $sformatf("%s product took %0d clocks, expected %0d", cc ? "CC" : "RC", clocks, matmul_cycles(cc, DIM, s)));
    check(mode_cc == 1'b0, "RC-mode after the program");
    bad = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        pm_get(r % DIM, c % DIM, 2 * s * s + (r / DIM) * s + c / DIM, got);
        checks++;
        if (got != C[r * N + c]) begin
          failures++; bad++;
          if (bad < 5) $display("%s C[%0d][%0d] = %0d expected %0d", cc ? "CC" : "RC", r, c, got, C[r * N + c]);
        end
      end
    $display("%s-mode %0dx%0d product on %0dx%0d PEs: %0d clocks (step count of the algorithm %0d)", cc ? "CC" : "RC", N, N, DIM, DIM, clocks,
             longint'(s) * s * (longint'(s) * (2 + 4 * DIM) + 1));
  endtask

  initial begin
    start = 0; cm_we = 0; cm_all = 0; cm_sel = 0; cm_addr = 0; cm_wdata = '0;
    pm_we = 0; pm_row = 0; pm_col = 0; pm_addr = 0; pm_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 4 x 4 example, zero-padded to one 8 x 8 block
    A = new[64]; B = new[64]; C = new[64];
    for (int k = 0; k < 64; k++) begin
      A[k] = (k / 8 < 4 && k % 8 < 4) ? $urandom_range(20) : 0;
      B[k] = (k / 8 < 4 && k % 8 < 4) ? $urandom_range(20) : 0;
    end
    matmul(1'b0, 8);
    for (int n = 64; n <= 256; n *= 2) begin
      A = new[n * n]; B = new[n * n]; C = new[n * n];
      for (int k = 0; k < n * n; k++) begin
        A[k] = $urandom_range(2000) - 1000;
        B[k] = $urandom_range(2000) - 1000;
      end
      matmul(1'b0, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
