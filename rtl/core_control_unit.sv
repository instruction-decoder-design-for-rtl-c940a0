// core_control_unit: the Core Control Unit (CCU).
//
// A parallel control pipeline that shadows the datapath. The instruction word
// in DECODE enters two decode entities: DECODE I gives the DECODE stage its
// controls in the same cycle, DECODE II registers the EXE1 controls. The word
// then travels DECODE II -> III -> IV -> V, and each entity re-decodes it one
// stage ahead to register the next stage's controls:
//
//   entity      runs while the word is in   its outputs are used in
//   DECODE I    DECODE                      DECODE (same cycle)
//   DECODE II   DECODE                      EXE1
//   DECODE III  EXE1                        EXE2
//   DECODE IV   EXE2                        EXE3
//   DECODE V    EXE3                        WRITE-BACK
//
// Flow control reads the decoded register usage of DECODE and the hazard
// information reported by entities III-V, and drives forwarding and stalls.
// Master control reads the exception sources and interrupt request and can
// flush stages and load a new PC; its flushes reach the control pipeline as the
// bubble/kill inputs of DECODE II-IV. All stage registers advance together
// unless the pipeline is frozen by a bus stall.
module core_control_unit
  import coffee_pkg::*;
#(
  parameter logic [XLEN-1:0] EXC_VECTOR = 32'h0000_0100,
  parameter logic [XLEN-1:0] INT_VECTOR = 32'h0000_0200,
  parameter bit              R0_ZERO    = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  // DECODE stage
  input  logic [31:0]     dec_instr,
  input  logic            dec_valid,
  input  logic [XLEN-1:0] dec_pc,
  output dec1_ctrl_t      dec_ctrl,
  output fwd_t            fwd_a,
  output fwd_t            fwd_b,
  // EXE1
  input  logic [XLEN-1:0] exe1_pc,
  input  logic            alu_ovf,
  output logic            exe1_valid,
  output exe1_ctrl_t      exe1_ctrl,
  // EXE2
  input  logic [XLEN-1:0] exe2_pc,
  input  logic            addr_err,
  output logic            exe2_valid,
  output exe2_ctrl_t      exe2_ctrl,
  // EXE3
  output logic            exe3_valid,
  output exe3_ctrl_t      exe3_ctrl,
  // WRITE-BACK
  output wb_ctrl_t        wb_ctrl,
  // pipeline flow
  input  logic            bus_stall,
  output logic            advance,
  output logic            hold_front,
  output logic            flush_front,
  output logic            pc_load,
  output logic [XLEN-1:0] pc_new,
  // interrupts and exceptions
  input  logic            int_req,
  output logic            int_ack,
  output logic            ccb_we,
  output exc_cause_t      exc_cause,
  output logic [XLEN-1:0] exc_pc
);
  logic [31:0] exe1_instr, exe2_instr, exe3_instr;
  hz_info_t    info_e1, info_e2, info_e3, info_wb;
  logic        hazard_stall;
  logic        kill_dec, kill_exe1, kill_exe2;

  ccu_decode1 #(.R0_ZERO(R0_ZERO)) u_dec1 (
    .instr (dec_instr), .valid (dec_valid), .ctrl (dec_ctrl)
  );

  ccu_decode2 u_dec2 (
    .clk, .rst_n, .en (advance), .bubble (hazard_stall || kill_dec),
    .instr_in (dec_instr), .valid_in (dec_valid),
    .instr_out (exe1_instr), .valid_out (exe1_valid), .ctrl (exe1_ctrl)
  );

  ccu_decode3 #(.R0_ZERO(R0_ZERO)) u_dec3 (
    .clk, .rst_n, .en (advance), .kill (kill_exe1),
    .instr_in (exe1_instr), .valid_in (exe1_valid), .info (info_e1),
    .instr_out (exe2_instr), .valid_out (exe2_valid), .ctrl (exe2_ctrl)
  );

  ccu_decode4 #(.R0_ZERO(R0_ZERO)) u_dec4 (
    .clk, .rst_n, .en (advance), .kill (kill_exe2),
    .instr_in (exe2_instr), .valid_in (exe2_valid), .info (info_e2),
    .instr_out (exe3_instr), .valid_out (exe3_valid), .ctrl (exe3_ctrl)
  );

  ccu_decode5 #(.R0_ZERO(R0_ZERO)) u_dec5 (
    .clk, .rst_n, .en (advance),
    .instr_in (exe3_instr), .valid_in (exe3_valid),
    .info_exe3 (info_e3), .info_wb (info_wb), .ctrl (wb_ctrl)
  );

  flow_control u_flow (
    .dec_valid, .dec (dec_ctrl),
    .info_exe1 (info_e1), .info_exe2 (info_e2), .info_exe3 (info_e3), .info_wb (info_wb),
    .bus_stall, .fwd_a, .fwd_b, .hazard_stall, .advance
  );

  master_control #(.EXC_VECTOR(EXC_VECTOR), .INT_VECTOR(INT_VECTOR)) u_master (
    .advance,
    .dec_valid, .dec_illegal (dec_ctrl.illegal), .dec_pc,
    .exe1_valid, .exe1_safe (info_e1.safe),
    .exe1_ovf (alu_ovf && exe1_ctrl.ovf_en), .exe1_pc,
    .exe2_valid, .exe2_safe (info_e2.safe),
    .exe2_addr_err (addr_err), .exe2_pc,
    .int_req,
    .kill_dec, .kill_exe1, .kill_exe2,
    .pc_load, .pc_new, .int_ack, .ccb_we, .exc_cause, .exc_pc
  );

  // FETCH/DECODE hold on a data hazard unless master control redirects the PC
  assign hold_front  = hazard_stall && !pc_load;
  assign flush_front = pc_load;
endmodule
