// tb_hmsa_regfile: self-checking test of the PE register set: reset to
// zero, then random writes and reads on both ports against a model.
module tb_hmsa_regfile;
  import hmsa_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [2:0] ra, rb, wa;
  word_t da, db, wd;
  logic we;
  word_t model [8];

  hmsa_regfile #(.NGPR(8)) dut (.clk, .rst_n, .ra, .rb, .da, .db, .we, .wa, .wd);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 8; k++) model[k] = '0;
    for (int n = 0; n < 1000; n++) begin
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      checks += 2;
      if (da !== model[ra] || db !== model[rb]) begin
        failures++;
        $display("read mismatch ra=%0d da=%h exp=%h rb=%0d db=%h exp=%h", ra, da, model[ra], rb, db, model[rb]);
      end
      we = 1'($urandom); wa = 3'($urandom); wd = $urandom;
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
