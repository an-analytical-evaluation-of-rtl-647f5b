// hmsa_cm: control memory (CM) of an HMSA local control unit.
//
// Holds CM_DEPTH instruction words (instr_t). The host writes it through
// the global control unit (we/waddr/wdata, at the clock edge); the local
// control unit fetches through an asynchronous read port, so fetch, decode
// and execute of an instruction fit in one clock. The size and the port
// timing are this design's choices; the architecture only names the CM.
module hmsa_cm
  import hmsa_pkg::*;
#(
  parameter int unsigned CM_DEPTH = 64
) (
  input  logic             clk,
  input  logic             we,
  input  logic [CM_AW-1:0] waddr,
  input  instr_t           wdata,
  input  logic [CM_AW-1:0] raddr,
  output instr_t           rdata
);

  localparam int unsigned AW = $clog2(CM_DEPTH);

  instr_t mem [CM_DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  assign rdata = mem[raddr[AW-1:0]];

  initial begin
    assert (CM_DEPTH <= (1 << CM_AW) && CM_DEPTH == (1 << AW))
      else $error("CM_DEPTH must be a power of two of at most 2**CM_AW");
  end

endmodule
