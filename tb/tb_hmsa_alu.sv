// tb_hmsa_alu: self-checking test of the PE ALU. Random operands for every
// operation, compared with results computed here.
module tb_hmsa_alu;
  import hmsa_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  pe_op_e op;
  word_t a, b, y, exp_y;

  hmsa_alu dut (.op, .a, .b, .y);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_op_e ops [7] = '{PE_ADD, PE_SUB, PE_MUL, PE_AND, PE_OR, PE_XOR, PE_MOV};
    for (int n = 0; n < 2000; n++) begin
      op = ops[n % 7];
      a = $urandom; b = $urandom;
      if (n < 7) begin a = 32'hFFFF_FFFF; b = 32'h0000_0003; end
      case (op)
        PE_ADD: exp_y = 32'((64'(a) + 64'(b)) & 64'hFFFF_FFFF);
        PE_SUB: exp_y = 32'((64'(a) - 64'(b)) & 64'hFFFF_FFFF);
        PE_MUL: exp_y = 32'((64'(a) * 64'(b)) & 64'hFFFF_FFFF);
        PE_AND: exp_y = a & b;
        PE_OR:  exp_y = a | b;
        PE_XOR: exp_y = a ^ b;
        default: exp_y = a;
      endcase
      @(posedge clk);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("ALU mismatch op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
