// tb_hmsa_pm: self-checking test of the dual-ported PE memory: writes
// through both ports, asynchronous reads on the PE port, one-clock reads on
// the host port, and the PE port winning a same-address write.
module tb_hmsa_pm;
  import hmsa_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic a_we, b_we;
  logic [PM_AW-1:0] a_addr, b_addr;
  word_t a_wdata, a_rdata, b_wdata, b_rdata;
  word_t model [DEPTH];

  hmsa_pm #(.PM_DEPTH(DEPTH)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata,
                                   .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill: even words through port B, odd words through port A
    for (int k = 0; k < DEPTH; k++) begin
      model[k] = $urandom;
      if (k % 2 == 0) begin b_we = 1; b_addr = PM_AW'(k); b_wdata = model[k]; a_we = 0; end
      else            begin a_we = 1; a_addr = PM_AW'(k); a_wdata = model[k]; b_we = 0; end
      @(posedge clk); #1;
    end
    a_we = 0; b_we = 0;
    // random reads on both ports, with random writes
    for (int n = 0; n < 2000; n++) begin
      word_t bexp;
      a_addr = PM_AW'($urandom_range(DEPTH - 1));
      b_addr = PM_AW'($urandom_range(DEPTH - 1));
      #1 check(a_rdata, model[a_addr], "port A read");
      bexp = model[b_addr];
      a_we = (n % 3 == 0); a_wdata = $urandom;
      b_we = (n % 5 == 0); b_wdata = $urandom;
      if (n % 15 == 0) b_addr = a_addr;   // both ports write one word
      bexp = model[b_addr];
      @(posedge clk);
      if (b_we) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
      #1 check(b_rdata, bexp, "port B read");
      a_we = 0; b_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
