// tb_hmsa_bcast_bus: self-checking test of one HBUS/VBUS: for every
// selected source, the bus must carry exactly that PE's word.
module tb_hmsa_bcast_bus;
  import hmsa_pkg::*;
  localparam int DIM = 8;
  logic clk = 0;
  int checks = 0, failures = 0;
  word_t src [DIM];
  logic [2:0] sel;
  word_t bus;

  hmsa_bcast_bus #(.DIM(DIM)) dut (.src, .sel, .bus);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < DIM; k++) src[k] = $urandom;
      sel = 3'(n);
      @(posedge clk);
      checks++;
      if (bus !== src[n % DIM]) begin
        failures++;
        $display("bus mismatch sel=%0d bus=%h exp=%h", sel, bus, src[n % DIM]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
