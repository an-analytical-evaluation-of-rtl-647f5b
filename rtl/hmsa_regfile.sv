// hmsa_regfile: the set of general-purpose registers of an HMSA PE.
//
// NGPR registers of DATA_W bits, two asynchronous read ports (ra/da,
// rb/db) and one write port written at the rising clock edge when we is
// high. A synchronous active-low reset clears all registers, so a program
// may rely on them starting at zero. The register count is this design's
// choice.
module hmsa_regfile
  import hmsa_pkg::*;
#(
  parameter int unsigned NGPR = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NGPR)-1:0]  ra,
  input  logic [$clog2(NGPR)-1:0]  rb,
  output word_t                    da,
  output word_t                    db,
  input  logic                     we,
  input  logic [$clog2(NGPR)-1:0]  wa,
  input  word_t                    wd
);

  word_t regs [NGPR];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NGPR; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign da = regs[ra];
  assign db = regs[rb];

endmodule
