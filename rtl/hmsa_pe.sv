// hmsa_pe: processing element of the HMSA array.
//
// A PE holds a set of general-purpose registers (hmsa_regfile), an ALU with
// multiplier (hmsa_alu), a shifter (hmsa_shifter), three special registers
// and its dual-ported processing memory (hmsa_pm):
//   BR  row/column broadcast register, loaded from the HBUS (RC-mode) or
//       VBUS (CC-mode) by a BCAST instruction,
//   RR  receive register, loaded from a neighbour by a SEND instruction,
//   SR  send register, holding the word this PE last sent to a neighbour.
// This structure is the architecture's; the operations and their timing
// are this design's own. Each instruction of ctrl takes one clock:
//   MOVI/LD/MUL/ADD/SUB/AND/OR/XOR/MOV/SHL/SHR write register rd,
//   ST       writes operand rs to PM[addr],
//   BCAST    offers operand rs on bcast_out; the bus word bus_in (the
//            offer of the PE its local control unit selected) goes to BR,
//   SEND dir offers operand rs on send_out (and keeps it in SR); the
//            neighbour word arriving against dir goes to RR and to rd, so a
//            whole row or column shifts by one PE in one clock,
//   BMUL     a BCAST whose bus word is also multiplied by operand rt into
//            rd in the same clock: the operand delivery overlaps the
//            multiplication, so all products a_ij * x_j of a matrix-vector
//            product are formed in one clock.
// Operands rs/rt name a general register (0..7), BR (8), RR (9) or SR (10).
//
// Interface: nbr_in[d] is the send_out of the neighbour lying in direction
// d (dir_e order N, S, E, W). hp_* is the host port (port B) of the PM; its
// read data arrives one clock after the address.
module hmsa_pe
  import hmsa_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 4096,
  parameter int unsigned NGPR     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pe_ctrl_t         ctrl,
  input  word_t            bus_in,
  output word_t            bcast_out,
  output word_t            send_out,
  input  word_t            nbr_in [4],
  input  logic             hp_we,
  input  logic [PM_AW-1:0] hp_addr,
  input  word_t            hp_wdata,
  output word_t            hp_rdata
);

  localparam int unsigned RW = $clog2(NGPR);

  word_t br_q, rr_q, sr_q;
  word_t ra_d, rb_d;
  word_t opa, opb;
  word_t alu_y, sh_y, pm_rdata, rx;
  logic  rf_we;
  word_t rf_wd;

  hmsa_regfile #(.NGPR(NGPR)) u_rf (
    .clk, .rst_n,
    .ra(ctrl.rs[RW-1:0]), .rb(ctrl.rt[RW-1:0]),
    .da(ra_d), .db(rb_d),
    .we(rf_we), .wa(ctrl.rd[RW-1:0]), .wd(rf_wd)
  );

  // Operand selection: general registers or special registers.
  function automatic word_t pick(input src_t s, input word_t gpr);
    unique case (s)
      SRC_BR:  return br_q;
      SRC_RR:  return rr_q;
      SRC_SR:  return sr_q;
      default: return gpr;
    endcase
  endfunction

  assign opa = pick(ctrl.rs, ra_d);
  assign opb = pick(ctrl.rt, rb_d);

  // BMUL multiplies the word arriving on the broadcast bus.
  hmsa_alu u_alu (
    .op(ctrl.op == PE_BMUL ? PE_MUL : ctrl.op),
    .a(ctrl.op == PE_BMUL ? bus_in : opa),
    .b(opb), .y(alu_y)
  );

  hmsa_shifter u_sh (
    .a(opa), .amt(ctrl.imm[$clog2(DATA_W)-1:0]),
    .left(ctrl.op == PE_SHL), .arith(ctrl.imm[5]), .y(sh_y)
  );

  hmsa_pm #(.PM_DEPTH(PM_DEPTH)) u_pm (
    .clk,
    .a_we(ctrl.op == PE_ST), .a_addr(ctrl.addr), .a_wdata(opa), .a_rdata(pm_rdata),
    .b_we(hp_we), .b_addr(hp_addr), .b_wdata(hp_wdata), .b_rdata(hp_rdata)
  );

  // Word arriving from the neighbour on the side the data comes from.
  always_comb begin
    unique case (ctrl.dir)
      DIR_N:   rx = nbr_in[DIR_S];
      DIR_S:   rx = nbr_in[DIR_N];
      DIR_E:   rx = nbr_in[DIR_W];
      default: rx = nbr_in[DIR_E];
    endcase
  end

  assign bcast_out = opa;
  assign send_out  = opa;

  // Register write-back.
  always_comb begin
    rf_we = 1'b1;
    unique case (ctrl.op)
      PE_MOVI:                 rf_wd = word_t'($signed(ctrl.imm));
      PE_LD:                   rf_wd = pm_rdata;
      PE_MUL, PE_ADD, PE_SUB, PE_AND, PE_OR, PE_XOR, PE_MOV, PE_BMUL:
                               rf_wd = alu_y;
      PE_SHL, PE_SHR:          rf_wd = sh_y;
      PE_SEND:                 rf_wd = rx;
      default: begin
        rf_we = 1'b0;
        rf_wd = alu_y;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      br_q <= '0;
      rr_q <= '0;
      sr_q <= '0;
    end else begin
      if (ctrl.op == PE_BCAST || ctrl.op == PE_BMUL) br_q <= bus_in;
      if (ctrl.op == PE_SEND) begin
        rr_q <= rx;
        sr_q <= opa;
      end
    end
  end

endmodule
