// tb_hmsa_shifter: self-checking test of the PE shifter: left, logical
// right and arithmetic right shifts by every amount, checked bit by bit.
module tb_hmsa_shifter;
  import hmsa_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  word_t a, y, e;
  logic [4:0] amt;
  logic left, arith;

  hmsa_shifter dut (.a, .amt, .left, .arith, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      a = $urandom; amt = 5'(n); left = n[5]; arith = n[6];
      if (n < 64) a[31] = 1'b1;
      // reference, one bit at a time
      for (int k = 0; k < 32; k++) begin
        if (left)            e[k] = (k >= amt) ? a[k - amt] : 1'b0;
        else if (k + amt < 32) e[k] = a[k + amt];
        else                 e[k] = arith ? a[31] : 1'b0;
      end
      @(posedge clk);
      checks++;
      if (y !== e) begin
        failures++;
        $display("shift mismatch a=%h amt=%0d left=%b arith=%b y=%h exp=%h", a, amt, left, arith, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
