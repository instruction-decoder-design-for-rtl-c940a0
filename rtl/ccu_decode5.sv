// ccu_decode5: CCU DECODE V, registered controls for WRITE-BACK.
//
// Runs while the instruction is in EXE3 and registers the write-back controls:
// register-file write enable, destination register, and whether the written
// value is the pipeline result or the word returned by the memory interface.
// It reports hazard information for both the EXE3 instruction (combinational)
// and the WRITE-BACK instruction (from its own registers; every result is ready
// there). Instructions in EXE3 are past every exception point, so there is no
// kill input. `en` low holds state.
module ccu_decode5
  import coffee_pkg::*;
#(
  parameter bit R0_ZERO = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] instr_in,
  input  logic        valid_in,
  output hz_info_t    info_exe3,
  output hz_info_t    info_wb,
  output wb_ctrl_t    ctrl
);
  wb_ctrl_t nxt;

  always_comb begin
    info_exe3  = mips_hz(instr_in, valid_in, R0_ZERO, STG_EXE3);
    nxt.rf_we  = valid_in && mips_writes(instr_in, R0_ZERO);
    nxt.waddr  = mips_dst(instr_in);
    nxt.wb_src = (mips_kind(instr_in) == I_LW) ? WB_MEM : WB_PIPE;

    info_wb.wr    = ctrl.rf_we;
    info_wb.dst   = ctrl.waddr;
    info_wb.ready = 1'b1;
    info_wb.safe  = STG_DEC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctrl <= '0;
    else if (en) ctrl <= nxt;
  end
endmodule
