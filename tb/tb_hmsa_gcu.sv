// tb_hmsa_gcu: self-checking test of the global control unit with the
// local control units replaced by stimuli: start handshake, the barrier
// (go only when every LCU waits, mode taken at that clock), completion when
// all have halted, the cycle counter, and the decode of host writes to the
// control memories and the PE memories.
module tb_hmsa_gcu;
  import hmsa_pkg::*;
  localparam int DIM = 4;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic start, busy, done, mode_cc, cm_we, cm_all, pm_we, lcu_start, lcu_go;
  logic [31:0] cycles;
  logic [1:0] cm_sel, pm_row, pm_col;
  logic [DIM-1:0] lcu_cm_we, lcu_mode_req, lcu_mode_val, lcu_halted;
  logic pe_hp_we [DIM][DIM];
  word_t pe_hp_rdata [DIM][DIM];
  word_t pm_rdata;

  hmsa_gcu #(.DIM(DIM)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    start = 0; cm_we = 0; cm_all = 0; cm_sel = 0; pm_we = 0; pm_row = 0; pm_col = 0;
    lcu_mode_req = 0; lcu_mode_val = 0; lcu_halted = 0;
    for (int r = 0; r < DIM; r++) for (int c = 0; c < DIM; c++) pe_hp_rdata[r][c] = word_t'(r * 16 + c + 32'hA000);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!busy && !done && !mode_cc, "idle after reset");
    // control-memory write decode
    for (int k = 0; k < DIM; k++) begin
      cm_we = 1; cm_all = 0; cm_sel = 2'(k); #1;
      check(lcu_cm_we == DIM'(1 << k), "CM write to one LCU");
    end
    cm_all = 1; #1 check(lcu_cm_we == '1, "CM write to all LCUs");
    cm_we = 0; #1 check(lcu_cm_we == '0, "no CM write");
    // PE-memory decode and read select
    for (int n = 0; n < 40; n++) begin
      int r, c, hits;
      r = $urandom_range(DIM - 1); c = $urandom_range(DIM - 1);
      pm_we = 1'($urandom); pm_row = 2'(r); pm_col = 2'(c); #1;
      hits = 0;
      for (int rr = 0; rr < DIM; rr++) for (int cc = 0; cc < DIM; cc++) hits += pe_hp_we[rr][cc];
      check(hits == int'(pm_we) && (!pm_we || pe_hp_we[r][c]), "PM write decode");
      @(posedge clk); #1;
      pm_row = 2'($urandom); pm_col = 2'($urandom);   // must not disturb the read
      #1 check(pm_rdata == word_t'(r * 16 + c + 32'hA000), "PM read select");
    end
    pm_we = 0;
    // run: start
    start = 1; #1 check(lcu_start, "start passed to the LCUs");
    @(posedge clk); #1 start = 0;
    check(busy && !done, "busy after start");
    start = 1; #1 check(!lcu_start, "start ignored while busy");
    start = 0;
    // LCUs arrive at a mode change one by one
    for (int k = 0; k < DIM; k++) begin
      lcu_mode_req[k] = 1; lcu_mode_val[k] = 1; #1;
      check(lcu_go == (k == DIM - 1), "go only when all LCUs wait");
      @(posedge clk); #1;
      check(mode_cc == (k == DIM - 1), "mode switches at the barrier");
    end
    lcu_mode_req = 0;
    repeat (5) @(posedge clk);
    // all arrive together at the mode change back
    lcu_mode_req = '1; lcu_mode_val = '0; #1 check(lcu_go, "go at once");
    @(posedge clk); #1 check(!mode_cc, "back to RC-mode");
    lcu_mode_req = 0;
    // halts one by one
    for (int k = 0; k < DIM; k++) begin
      lcu_halted[k] = 1; #1;
      check(done == (k == DIM - 1), "done when all have halted");
      @(posedge clk); #1;
    end
    check(!busy && !done, "idle after done");
    check(cycles == 32'(DIM + 5 + 1 + DIM - 1), $sformatf("cycle count %0d", cycles));
    // a second start clears the counter and the mode
    lcu_halted = 0;
    start = 1; @(posedge clk); #1 start = 0;
    check(busy && cycles == 0, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
