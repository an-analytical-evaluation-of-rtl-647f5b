// hmsa_shifter: barrel shifter of an HMSA processing element.
//
// Combinational. Shifts the DATA_W-bit operand a by amt (0..DATA_W-1)
// places: left (left = 1), logical right (left = 0, arith = 0) or
// arithmetic right (left = 0, arith = 1). Which shifts the PE offers is this
// design's choice; the architecture only lists a shifter as part of each PE.
module hmsa_shifter
  import hmsa_pkg::*;
(
  input  word_t                      a,
  input  logic [$clog2(DATA_W)-1:0]  amt,
  input  logic                       left,
  input  logic                       arith,
  output word_t                      y
);

  always_comb begin
    if (left)       y = a << amt;
    else if (arith) y = word_t'($signed(a) >>> amt);
    else            y = a >> amt;
  end

endmodule
