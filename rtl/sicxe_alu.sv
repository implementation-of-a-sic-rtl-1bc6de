// sicxe_alu: combinational 24-bit ALU of the SIC/XE processor.
//
// Computes one of add, subtract, multiply (low 24 bits), and, or, rotate
// left, arithmetic shift right, pass-through of either operand, or byte
// insert ({a[23:8], b[7:0]}, used by LDCH and RD). In parallel it always
// compares the two operands as signed 24-bit integers and returns the
// condition code (00 less, 01 equal, 10 greater). Shift and rotate use the
// separate 5-bit amount shamt. The set of operations is what the
// instruction set needs; the document gives only that the ALU does
// arithmetic, logic and address calculation with a compare output.
module sicxe_alu
  import sicxe_pkg::*;
(
  input  alu_op_e     op,
  input  logic [23:0] a,
  input  logic [23:0] b,
  input  logic [4:0]  shamt,
  output logic [23:0] result,
  output logic [1:0]  cmp
);
  always_comb begin
    unique case (op)
      ALU_ADD:   result = a + b;
      ALU_SUB:   result = a - b;
      ALU_MUL:   result = a * b;
      ALU_AND:   result = a & b;
      ALU_OR:    result = a | b;
      ALU_SHL:   result = (a << shamt) | (a >> (5'd24 - shamt));
      ALU_SHR:   result = 24'($signed(a) >>> shamt);
      ALU_PASSA: result = a;
      ALU_PASSB: result = b;
      ALU_BYTE:  result = {a[23:8], b[7:0]};
      default:   result = '0;
    endcase
    if ($signed(a) < $signed(b))      cmp = CC_LT;
    else if (a == b)                  cmp = CC_EQ;
    else                              cmp = CC_GT;
  end
endmodule
