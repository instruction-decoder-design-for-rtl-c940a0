// ccu_decode1: CCU DECODE I, combinational controls for the instruction in DECODE.
//
// Re-decodes the MIPS word (opcode plus function field, i.e. 12 bits for R-type
// instead of the 6-bit COFFEE opcode) and produces the controls used by the
// DECODE stage in the same cycle: instruction class and format, the two source
// register indices and whether each is used (number of operands), the
// destination register and whether the register file is written, the ALU
// opcode, immediate-operand select, number of ALU cycles (1, or 3 for MUL),
// branch flag, safe state and the illegal-instruction flag. Conditional
// execution and condition-register writes are disabled for MIPS code and are
// always driven low. With R0_ZERO set, a write to register 0 is dropped here so
// the register keeps the value zero; by default register 0 is writable, as in
// the original core.
module ccu_decode1
  import coffee_pkg::*;
#(
  parameter bit R0_ZERO = 1'b0
) (
  input  logic [31:0] instr,
  input  logic        valid,
  output dec1_ctrl_t  ctrl
);
  instr_t k;

  always_comb begin
    k = valid ? mips_kind(instr) : I_NOP;
    ctrl            = '0;
    ctrl.kind       = k;
    ctrl.fmt        = valid ? mips_fmt(instr) : FMT_NONE;
    ctrl.rs         = instr[25:21];
    ctrl.rt         = instr[20:16];
    ctrl.dst        = mips_dst(instr);
    ctrl.rf_we      = valid && mips_writes(instr, R0_ZERO);
    ctrl.illegal    = (k == I_ILLEGAL);
    ctrl.safe_stage = kind_safe_stage(k);
    ctrl.is_branch  = 1'b0;
    ctrl.cex        = 1'b0;
    ctrl.cr_we      = 1'b0;
    ctrl.alu_cycles = (k == I_MUL) ? 2'd3 : 2'd1;

    unique case (k)
      I_ADD, I_ADDU, I_SUB, I_SUBU, I_AND, I_OR, I_XOR, I_MUL:
        begin ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
      I_ADDI, I_ADDIU, I_ANDI, I_ORI, I_LW:
        begin ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b0; end
      I_SW:
        begin ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
      default:
        begin ctrl.uses_rs = 1'b0; ctrl.uses_rt = 1'b0; end
    endcase
    ctrl.n_operands = 2'(ctrl.uses_rs) + 2'(ctrl.uses_rt);
    ctrl.use_imm    = (ctrl.fmt == FMT_I);

    unique case (k)
      I_SUB, I_SUBU:          ctrl.alu_op = ALU_SUB;
      I_AND, I_ANDI:          ctrl.alu_op = ALU_AND;
      I_OR, I_ORI:            ctrl.alu_op = ALU_OR;
      I_XOR:                  ctrl.alu_op = ALU_XOR;
      default:                ctrl.alu_op = ALU_ADD;  // adds, address generation
    endcase
  end
endmodule
