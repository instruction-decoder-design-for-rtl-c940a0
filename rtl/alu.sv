// alu: EXE1 arithmetic and logic unit.
//
// Computes y = a op b for the operations the MIPS subset needs (add, subtract,
// AND, OR, XOR, pass-A) and the Z/N/C flags of the result, plus a signed-overflow
// flag used to raise the MIPS ADD/ADDI/SUB overflow exception. The operation
// arrives as an ALU opcode chosen by the control unit and is decoded here, as in
// the original core where the ALU decodes its own opcodes. Carry for subtraction
// is the borrow-free carry out of a + ~b + 1. Purely combinational: the result is
// valid in the same EXE1 cycle and is registered by the pipeline.
module alu
  import coffee_pkg::*;
(
  input  alu_op_t          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic [XLEN-1:0]  y,
  output logic             flag_z,
  output logic             flag_n,
  output logic             flag_c,
  output logic             ovf
);
  logic [XLEN:0] sum;
  logic          is_sub;

  always_comb begin
    is_sub = (op == ALU_SUB);
    sum    = {1'b0, a} + {1'b0, (is_sub ? ~b : b)} + {{XLEN{1'b0}}, is_sub};
    ovf    = 1'b0;
    flag_c = 1'b0;
    unique case (op)
      ALU_ADD, ALU_SUB: begin
        y      = sum[XLEN-1:0];
        flag_c = sum[XLEN];
        ovf    = (a[XLEN-1] == (is_sub ? ~b[XLEN-1] : b[XLEN-1])) &&
                 (y[XLEN-1] != a[XLEN-1]);
      end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_PASSA: y = a;
      default:   y = '0;
    endcase
    flag_z = (y == '0);
    flag_n = y[XLEN-1];
  end
endmodule
