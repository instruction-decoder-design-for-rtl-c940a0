// ccu_decode3: CCU DECODE III, registered controls for EXE2.
//
// Runs while the instruction is in EXE1. It registers into EXE2 the instruction
// word, its valid bit and the EXE2 controls: the source of the value passed
// from EXE2 to EXE3 (ALU result, 16x16 product or condition register; the MIPS
// subset only uses the ALU), the data-bus read/write indication for the coming
// access, and the request to the address checker for loads and stores. It also
// reports, combinationally, what flow and master control need about the EXE1
// instruction (destination, whether its result is ready, its safe stage).
// `kill` drops the EXE1 instruction (exception flush); `en` low holds state.
module ccu_decode3
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
  output exe2_ctrl_t  ctrl
);
  exe2_ctrl_t nxt;
  instr_t     k;

  always_comb begin
    k            = mips_kind(instr_in);
    info         = mips_hz(instr_in, valid_in, R0_ZERO, STG_EXE1);
    nxt          = '0;
    nxt.src      = E2_ALU;
    nxt.dbus_re  = (k == I_LW);
    nxt.dbus_we  = (k == I_SW);
    nxt.addr_chk = (k == I_LW) || (k == I_SW);
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
