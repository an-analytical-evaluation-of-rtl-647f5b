// hmsa_pm: processing memory (PM) of an HMSA processing element.
//
// A dual-ported memory of PM_DEPTH words of DATA_W bits. Port A belongs to
// the PE: its read is asynchronous, so a load instruction reads the word and
// writes it into a register in the same clock (the architecture charges one
// unit of time per load and per store); its write happens at the clock
// edge. Port B belongs to the host, reached through the global control unit,
// for loading the operand matrices and reading results: synchronous read
// (b_rdata is valid the clock after b_addr) and clocked write. When both
// ports write the same word in one clock, port A's word is kept. The depth
// and the port timing are this design's choices; the architecture gives
// each PE a dual-ported memory of unstated size.
module hmsa_pm
  import hmsa_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 4096
) (
  input  logic             clk,
  // port A: PE
  input  logic             a_we,
  input  logic [PM_AW-1:0] a_addr,
  input  word_t            a_wdata,
  output word_t            a_rdata,
  // port B: host
  input  logic             b_we,
  input  logic [PM_AW-1:0] b_addr,
  input  word_t            b_wdata,
  output word_t            b_rdata
);

  localparam int unsigned AW = $clog2(PM_DEPTH);

  word_t mem [PM_DEPTH];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr[AW-1:0]] <= b_wdata;
    if (a_we) mem[a_addr[AW-1:0]] <= a_wdata;
    b_rdata <= mem[b_addr[AW-1:0]];
  end

  assign a_rdata = mem[a_addr[AW-1:0]];

  initial begin
    assert (PM_DEPTH <= (1 << PM_AW) && PM_DEPTH == (1 << AW))
      else $error("PM_DEPTH must be a power of two of at most 2**PM_AW");
  end

endmodule
