// tb_hmsa_pe: self-checking test of one processing element. Random
// instruction streams (every PE operation, broadcast-multiply included, every operand source, every SEND
// direction) run against a model of the registers BR/RR/SR, the eight
// general registers and the memory kept here. The operand the PE offers
// (bcast_out/send_out) is compared with the model every clock, memory
// contents are read back through the host port at the end, and a load,
// multiply, add sequence is timed: each instruction must take one clock.
module tb_hmsa_pe;
  import hmsa_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  pe_ctrl_t ctrl;
  word_t bus_in, bcast_out, send_out, hp_wdata, hp_rdata;
  word_t nbr_in [4];
  logic hp_we;
  logic [PM_AW-1:0] hp_addr;

  word_t m_r [8];
  word_t m_br, m_rr, m_sr;
  word_t m_pm [DEPTH];

  hmsa_pe #(.PM_DEPTH(DEPTH)) dut (.clk, .rst_n, .ctrl, .bus_in, .bcast_out, .send_out,
                                   .nbr_in, .hp_we, .hp_addr, .hp_wdata, .hp_rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t src(src_t s);
    case (s)
      SRC_BR:  return m_br;
      SRC_RR:  return m_rr;
      SRC_SR:  return m_sr;
      default: return m_r[s[2:0]];
    endcase
  endfunction

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // Apply one instruction for one clock and update the model.
  task automatic step(input pe_ctrl_t c);
    word_t a, b, rx, r;
    ctrl = c;
    bus_in = $urandom;
    for (int d = 0; d < 4; d++) nbr_in[d] = $urandom;
    #1;
    a = src(c.rs); b = src(c.rt);
    check(bcast_out, a, "operand offered");
    check(send_out, a, "operand sent");
    case (c.dir)
      DIR_N: rx = nbr_in[DIR_S];
      DIR_S: rx = nbr_in[DIR_N];
      DIR_E: rx = nbr_in[DIR_W];
      default: rx = nbr_in[DIR_E];
    endcase
    @(posedge clk);
    case (c.op)
      PE_MOVI:  m_r[c.rd] = {{16{c.imm[15]}}, c.imm};
      PE_LD:    m_r[c.rd] = m_pm[c.addr[5:0]];
      PE_ST:    m_pm[c.addr[5:0]] = a;
      PE_BCAST: m_br = bus_in;
      PE_MUL:   m_r[c.rd] = a * b;
      PE_ADD:   m_r[c.rd] = a + b;
      PE_SUB:   m_r[c.rd] = a - b;
      PE_AND:   m_r[c.rd] = a & b;
      PE_OR:    m_r[c.rd] = a | b;
      PE_XOR:   m_r[c.rd] = a ^ b;
      PE_MOV:   m_r[c.rd] = a;
      PE_SHL:   m_r[c.rd] = a << c.imm[4:0];
      PE_SHR:   begin
        r = a >> c.imm[4:0];
        if (c.imm[5] && a[31]) r = r | ~(32'hFFFF_FFFF >> c.imm[4:0]);
        m_r[c.rd] = r;
      end
      PE_SEND:  begin m_rr = rx; m_sr = a; m_r[c.rd] = rx; end
      PE_BMUL:  begin m_br = bus_in; m_r[c.rd] = bus_in * b; end
      default: ;
    endcase
    #1;
  endtask

  initial begin
    pe_ctrl_t c;
    int t0;
    ctrl = PE_CTRL_NOP; hp_we = 0; hp_addr = 0; hp_wdata = 0; bus_in = 0;
    for (int d = 0; d < 4; d++) nbr_in[d] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 8; k++) m_r[k] = 0;
    m_br = 0; m_rr = 0; m_sr = 0;
    // host port fills the memory
    for (int k = 0; k < DEPTH; k++) begin
      m_pm[k] = $urandom;
      hp_we = 1; hp_addr = PM_AW'(k); hp_wdata = m_pm[k];
      @(posedge clk); #1;
    end
    hp_we = 0;
    // timed sequence: LD, LD, MUL, ADD each one clock
    t0 = $time;
    c = PE_CTRL_NOP; c.op = PE_LD; c.rd = 0; c.addr = 3; step(c);
    c = PE_CTRL_NOP; c.op = PE_LD; c.rd = 1; c.addr = 7; step(c);
    c = PE_CTRL_NOP; c.op = PE_MUL; c.rd = 2; c.rs = 0; c.rt = 1; step(c);
    c = PE_CTRL_NOP; c.op = PE_ADD; c.rd = 3; c.rs = 2; c.rt = 2; step(c);
    checks++;
    if (($time - t0) != 4 * 10) begin
      failures++;
      $display("four instructions took %0d time units", $time - t0);
    end
    c = PE_CTRL_NOP; c.rs = 3; step(c);
    check(bcast_out, 2 * m_pm[3] * m_pm[7], "load-multiply-add result");
    // random instructions
    for (int n = 0; n < 5000; n++) begin
      c.op   = pe_op_e'($urandom_range(15));
      c.rd   = 3'($urandom);
      c.rs   = src_t'($urandom_range(10));
      c.rt   = src_t'($urandom_range(10));
      c.imm  = 16'($urandom);
      c.addr = PM_AW'($urandom_range(DEPTH - 1));
      c.dir  = dir_e'($urandom);
      step(c);
    end
    ctrl = PE_CTRL_NOP;
    // read the memory back through the host port
    for (int k = 0; k < DEPTH; k++) begin
      hp_addr = PM_AW'(k);
      @(posedge clk); #1;
      check(hp_rdata, m_pm[k], "memory via host port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
