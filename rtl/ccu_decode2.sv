// ccu_decode2: CCU DECODE II, registered controls for EXE1.
//
// Runs while the instruction is in DECODE and registers, on the edge that moves
// it into EXE1, the instruction word, its valid bit and the EXE1 controls: ALU
// opcode, overflow-exception enable (ADD, ADDI, SUB), multiplier start and mode,
// and the co-processor mapping flag (no instruction of the MIPS subset uses a
// co-processor, so it stays low). It also carries the flush control of the
// control pipeline: `bubble` (a data-hazard stall or a flush of the DECODE
// instruction) loads an invalid entry. `en` low (pipeline frozen) holds state.
module ccu_decode2
  import coffee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        bubble,
  input  logic [31:0] instr_in,
  input  logic        valid_in,
  output logic [31:0] instr_out,
  output logic        valid_out,
  output exe1_ctrl_t  ctrl
);
  exe1_ctrl_t nxt;
  instr_t     k;

  always_comb begin
    k              = mips_kind(instr_in);
    nxt            = '0;
    nxt.ovf_en     = k inside {I_ADD, I_ADDI, I_SUB};
    nxt.mul_en     = (k == I_MUL);
    nxt.mul_mode16 = 1'b0;
    nxt.mul_signed = 1'b1;
    nxt.cop_en     = 1'b0;
    unique case (k)
      I_SUB, I_SUBU:  nxt.alu_op = ALU_SUB;
      I_AND, I_ANDI:  nxt.alu_op = ALU_AND;
      I_OR, I_ORI:    nxt.alu_op = ALU_OR;
      I_XOR:          nxt.alu_op = ALU_XOR;
      default:        nxt.alu_op = ALU_ADD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr_out <= '0;
      valid_out <= 1'b0;
      ctrl      <= '0;
    end else if (en) begin
      instr_out <= instr_in;
      valid_out <= valid_in && !bubble;
      ctrl      <= (valid_in && !bubble) ? nxt : '0;
    end
  end
endmodule
