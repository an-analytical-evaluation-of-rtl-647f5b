// tb_hmsa_cm: self-checking test of the control memory: random instruction
// words written, read back asynchronously.
module tb_hmsa_cm;
  import hmsa_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic we;
  logic [CM_AW-1:0] waddr, raddr;
  instr_t wdata, rdata;
  instr_t model [DEPTH];

  hmsa_cm #(.CM_DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t rnd();
    logic [$bits(instr_t)-1:0] v;
    for (int k = 0; k < $bits(instr_t); k += 32) v = {v, $urandom};
    return instr_t'(v);
  endfunction

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int k = 0; k < DEPTH; k++) begin
      model[k] = rnd();
      we = 1; waddr = CM_AW'(k); wdata = model[k];
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 1000; n++) begin
      raddr = CM_AW'($urandom_range(DEPTH - 1));
      if (n % 4 == 0) begin
        we = 1; waddr = CM_AW'($urandom_range(DEPTH - 1)); wdata = rnd();
      end
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("CM read mismatch at %0d", raddr);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1 we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
