// ccu_decode4: CCU DECODE IV, registered controls for EXE3 (memory stage).
//
// Runs while the instruction is in EXE2 and registers into EXE3: the memory
// load and store strobes (a load or store happens in the next cycle), the
// source of the value passed from EXE3 to WRITE-BACK (the pipeline value or the
// 32x32 product; E3_CCB is kept for configuration-block reads, which the MIPS
// subset does not use), and the write-back source (pipeline or memory). It also
// reports the EXE2 instruction's hazard information. `kill` drops the EXE2
// instruction (address exception); `en` low holds state.
module ccu_decode4
  import coffee_pkg::*;
#(
  parameter bit R0_ZERO = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        kill,
  input  logic [31:0] instr_in,
  input  logic        valid_in,
  output hz_info_t    info,
  output logic [31:0] instr_out,
  output logic        valid_out,
  output exe3_ctrl_t  ctrl
);
  exe3_ctrl_t nxt;
  instr_t     k;

  always_comb begin
    k             = mips_kind(instr_in);
    info          = mips_hz(instr_in, valid_in, R0_ZERO, STG_EXE2);
    nxt           = '0;
    nxt.mem_load  = (k == I_LW);
    nxt.mem_store = (k == I_SW);
    nxt.src       = (k == I_MUL) ? E3_MUL32 : E3_PIPE;
    nxt.wb_src    = (k == I_LW) ? WB_MEM : WB_PIPE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr_out <= '0;
      valid_out <= 1'b0;
      ctrl      <= '0;
    end else if (en) begin
      instr_out <= instr_in;
      valid_out <= valid_in && !kill;
      ctrl      <= (valid_in && !kill) ? nxt : '0;
    end
  end
endmodule
