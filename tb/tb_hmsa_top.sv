// tb_hmsa_top: end-to-end test of the HMSA at its default size (8 x 8 PEs,
// 4096-word PE memories, 64-word control memories).
//   1. C = A x B for 16 x 16 matrices (2 x 2 blocks per PE) in RC-mode:
//      concurrent diagonal HBUS broadcasts, b shifted north with torus wrap.
//   2. C = B x A for the same matrices in CC-mode: VBUS broadcasts, b shifted
//      west; the program switches mode at its start and end.
//   3. A barrier: LCU k runs k NOPs before a mode change, so the others wait;
//      in CC-mode each LCU then writes its own constant into its column.
//   4. The products a_ij * x_j of a matrix-vector product in one clock: in
//      CC-mode every diagonal PE(j,j) broadcasts x_j down its column while
//      every PE multiplies it by its a_ij (BMUL).
// Products are compared with a reference computed here, and the clocks of
// each product run with the step count of the algorithm (plus one clear per
// result block, the HALT and the mode changes). Every mechanism (HBUS and
// VBUS broadcast, north and west shifts, mode switch, barrier wait, outer
// block loop, broadcast overlapped with multiply) is counted; one that never happens counts as a failure.
module tb_hmsa_top;
  import hmsa_pkg::*;
  import hmsa_tb_pkg::*;
  localparam int DIM = 8;
  localparam int N   = 16;

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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from the control of LCU 0 and the GCU
  int n_bmul = 0, n_hbus = 0, n_vbus = 0, n_shift_n = 0, n_shift_w = 0, n_mode = 0, n_wait = 0, n_outer = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_lcu[0].u_lcu.ctrl.op == PE_BCAST) begin
      if (dut.mode_cc) n_vbus <= n_vbus + 1;
      else             n_hbus <= n_hbus + 1;
    end
    if (dut.g_lcu[0].u_lcu.ctrl.op == PE_SEND && dut.g_lcu[0].u_lcu.ctrl.dir == DIR_N) n_shift_n <= n_shift_n + 1;
    if (dut.g_lcu[0].u_lcu.ctrl.op == PE_SEND && dut.g_lcu[0].u_lcu.ctrl.dir == DIR_W) n_shift_w <= n_shift_w + 1;
    if (dut.g_lcu[0].u_lcu.ctrl.op == PE_BMUL) n_bmul <= n_bmul + 1;
    if (dut.lcu_go) n_mode <= n_mode + 1;
    if (|dut.lcu_mode_req && !dut.lcu_go) n_wait <= n_wait + 1;
    if (dut.g_lcu[0].u_lcu.state_q == 2'd1 && dut.g_lcu[0].u_lcu.ir.flow == FL_LOOP2 &&
        32'(dut.g_lcu[0].u_lcu.x_q[dut.g_lcu[0].u_lcu.ir.la_x]) + 1 >= 32'(dut.g_lcu[0].u_lcu.ir.la_cnt) &&
        32'(dut.g_lcu[0].u_lcu.x_q[dut.g_lcu[0].u_lcu.ir.lb_x]) + 1 <  32'(dut.g_lcu[0].u_lcu.ir.lb_cnt))
      n_outer <= n_outer + 1;
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
  task automatic matmul(input bit cc);
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
    $display("%s-mode %0dx%0d product on %0dx%0d PEs: %0d clocks", cc ? "CC" : "RC", N, N, DIM, DIM, clocks);
  endtask

  // Barrier: LCU k waits k clocks before the mode change.
  task automatic barrier_test();
    int clocks, got;
    for (int k = 0; k < DIM; k++) begin
      int a;
      a = 0;
      for (int w = 0; w < k; w++) cm_write(k, 1'b0, a++, i_nop());
      cm_write(k, 1'b0, a++, i_mode(1'b1));
      cm_write(k, 1'b0, a++, i_pe(PE_MOVI, 6, 0, 0, 300 + k));
      cm_write(k, 1'b0, a++, with_ea(i_pe(PE_ST, 0, 6, 0, 0), 4000, 0, 0, 0));
      cm_write(k, 1'b0, a++, i_mode(1'b0));
      cm_write(k, 1'b0, a++, i_halt());
    end
    run_and_wait(clocks);
    check(clocks == DIM + 4, $sformatf("barrier program took %0d clocks, expected %0d", clocks, DIM + 4));
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++) begin
        pm_get(r, c, 4000, got);
        check(got == 300 + c, $sformatf("CC-mode column control: PE(%0d,%0d) = %0d", r, c, got));
      end
  endtask

  // Element products of y = A x: x_j sits in PE(j,j), a_ij in PE(i,j).
  task automatic matvec_test();
    int clocks, got;
    int a [DIM][DIM];
    int x [DIM];
    for (int j = 0; j < DIM; j++) begin
      x[j] = $urandom_range(2000) - 1000;
      pm_put(j, j, 3000, 1, x[j]);
      for (int i = 0; i < DIM; i++) begin
        a[i][j] = $urandom_range(2000) - 1000;
        pm_put(i, j, 3001, 1, a[i][j]);
      end
    end
    cm_write(0, 1'b1, 0, i_mode(1'b1));
    cm_write(0, 1'b1, 1, with_ea(i_pe(PE_LD, 0, 0, 0, 0), 3000, 0, 0, 0));
    cm_write(0, 1'b1, 2, with_ea(i_pe(PE_LD, 1, 0, 0, 0), 3001, 0, 0, 0));
    cm_write(0, 1'b1, 3, i_pe(PE_BMUL, 2, 0, 1, 0));          // offset 0: diagonal PE drives
    cm_write(0, 1'b1, 4, with_ea(i_pe(PE_ST, 0, 2, 0, 0), 3002, 0, 0, 0));
    cm_write(0, 1'b1, 5, i_mode(1'b0));
    cm_write(0, 1'b1, 6, i_halt());
    run_and_wait(clocks);
    check(clocks == 7, $sformatf("matrix-vector program took %0d clocks, expected 7", clocks));
    for (int i = 0; i < DIM; i++)
      for (int j = 0; j < DIM; j++) begin
        pm_get(i, j, 3002, got);
        check(got == a[i][j] * x[j], $sformatf("a*x product PE(%0d,%0d) = %0d expected %0d", i, j, got, a[i][j] * x[j]));
      end
  endtask

  initial begin
    start = 0; cm_we = 0; cm_all = 0; cm_sel = 0; cm_addr = 0; cm_wdata = '0;
    pm_we = 0; pm_row = 0; pm_col = 0; pm_addr = 0; pm_wdata = 0;
    A = new[N * N]; B = new[N * N]; C = new[N * N];
    for (int k = 0; k < N * N; k++) begin
      A[k] = $urandom_range(2000) - 1000;
      B[k] = $urandom_range(2000) - 1000;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    matmul(1'b0);
    matmul(1'b1);
    barrier_test();
    matvec_test();
    $display("mechanisms: bmul=%0d hbus=%0d vbus=%0d shift_n=%0d shift_w=%0d mode_switch=%0d barrier_wait=%0d outer_loop=%0d",
             n_bmul, n_hbus, n_vbus, n_shift_n, n_shift_w, n_mode, n_wait, n_outer);
    check(n_bmul > 0, "no broadcast-multiply");
    check(n_hbus > 0, "no HBUS broadcast");
    check(n_vbus > 0, "no VBUS broadcast");
    check(n_shift_n > 0, "no north shift");
    check(n_shift_w > 0, "no west shift");
    check(n_mode > 0, "no mode switch");
    check(n_wait > 0, "no barrier wait");
    check(n_outer > 0, "no outer block loop step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
