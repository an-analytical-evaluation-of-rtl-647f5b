// hmsa_alu: arithmetic logic unit of an HMSA processing element.
//
// Purely combinational. It performs the multiply and the add of the
// multiply-accumulate step of the matrix product (one instruction each, as
// the step count of the architecture charges one unit for the multiply and
// one for the add), and the usual subtract, and, or, xor and move. Operands
// and result are DATA_W-bit two's complement words; the product keeps its
// low DATA_W bits and sums wrap. The operation set beyond multiply and add is
// this design's choice. Shifts are done by the separate shifter.
//
// Interface: op selects the operation (pe_op_e), a and b are the operands,
// y the result. Operations that are not ALU operations give a.
module hmsa_alu
  import hmsa_pkg::*;
(
  input  pe_op_e op,
  input  word_t  a,
  input  word_t  b,
  output word_t  y
);

  always_comb begin
    unique case (op)
      PE_ADD:  y = a + b;
      PE_SUB:  y = a - b;
      PE_MUL:  y = a * b;
      PE_AND:  y = a & b;
      PE_OR:   y = a | b;
      PE_XOR:  y = a ^ b;
      default: y = a;
    endcase
  end

endmodule
