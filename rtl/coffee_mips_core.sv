// coffee_mips_core: six-stage COFFEE-style RISC pipeline that executes MIPS32
// machine code.
//
// The pipeline keeps the original core's organisation and changes only how
// instructions are decoded: the DECODE stage and the Core Control Unit read
// MIPS32 words (R-, I- and J-formats) instead of COFFEE words.
//
//   FETCH      PC -> i_addr, instruction word captured into the DECODE register;
//              the PC advances by 4.
//   DECODE     mips_decoder extracts rs/rt/rd and the immediate, reads the
//              register file, applies forwarding and selects ALU operands;
//              CCU DECODE I supplies its controls in the same cycle.
//   EXE1       ALU (add, sub, and, or, xor; signed overflow for ADD/ADDI/SUB);
//              the multiplier starts.
//   EXE2       co-processor stage: the address checker validates load/store
//              addresses; the 16x16 product would be selected here.
//   EXE3       memory stage: d_addr/d_wdata/d_we/d_re are driven from the EXE3
//              register; the 32x32 product completes.
//   WRITE-BACK the pipeline value or the load data is written to the register
//              file.
//
// Memories: i_rdata must return the word at i_addr in the same cycle, and
// d_rdata the word at d_addr in the same cycle (combinational reads, as from a
// small on-chip RAM or a cache hit). bus_stall freezes every stage for as long
// as it is high (a bus wait or cache miss). Throughput is one instruction per
// cycle; a register read that needs a load or MUL result still in flight
// stalls FETCH/DECODE until that result reaches WRITE-BACK.
//
// Exceptions (illegal instruction, arithmetic overflow, misaligned address) and
// interrupts redirect fetch to EXC_VECTOR / INT_VECTOR and report cause and PC
// on ccb_we/exc_cause/exc_pc; int_ack marks an accepted interrupt. Vectors and
// reset PC are this design's choices. R0_ZERO=0 keeps register 0 writable, as
// in the original core; R0_ZERO=1 makes it read as zero the way MIPS code
// expects.
module coffee_mips_core
  import coffee_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC   = 32'h0000_0000,
  parameter logic [XLEN-1:0] EXC_VECTOR = 32'h0000_0100,
  parameter logic [XLEN-1:0] INT_VECTOR = 32'h0000_0200,
  parameter bit              R0_ZERO    = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction memory
  output logic [XLEN-1:0] i_addr,
  input  logic [31:0]     i_rdata,
  // data memory
  output logic [XLEN-1:0] d_addr,
  output logic [XLEN-1:0] d_wdata,
  output logic            d_we,
  output logic            d_re,
  input  logic [XLEN-1:0] d_rdata,
  input  logic            bus_stall,
  // interrupts and exceptions
  input  logic            int_req,
  output logic            int_ack,
  output logic            ccb_we,
  output exc_cause_t      exc_cause,
  output logic [XLEN-1:0] exc_pc
);
  // ---------------- control ----------------
  dec1_ctrl_t dec_ctrl;
  exe1_ctrl_t exe1_ctrl;
  exe2_ctrl_t exe2_ctrl;
  exe3_ctrl_t exe3_ctrl;
  wb_ctrl_t   wb_ctrl;
  fwd_t       fwd_a, fwd_b;
  logic       exe1_valid, exe2_valid, exe3_valid;
  logic       advance, hold_front, flush_front, pc_load;
  logic [XLEN-1:0] pc_new;

  // ---------------- datapath state ----------------
  logic [XLEN-1:0] pc;
  logic [31:0]     id_instr;
  logic [XLEN-1:0] id_pc;
  logic            id_valid;
  logic [XLEN-1:0] e1_a, e1_b, e1_sd, e1_pc;
  logic [XLEN-1:0] e2_res, e2_sd, e2_pc;
  logic [XLEN-1:0] e3_val, e3_sd;
  logic [XLEN-1:0] wb_pipe, wb_mem, wb_data;

  // ---------------- DECODE ----------------
  logic [4:0]      rs_idx, rt_idx, dst_idx;
  logic [XLEN-1:0] rf_a, rf_b, imm_ext, op_a, op_b, store_data;
  fmt_t            fmt;
  logic [XLEN-1:0] alu_y, e2_val, e3_out;
  logic            alu_ovf, alu_z, alu_n, alu_c, addr_err;
  logic [XLEN-1:0] mul16;
  logic [2*XLEN-1:0] mul64;

  // FETCH
  assign i_addr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= RESET_PC;
      id_instr <= '0;
      id_pc    <= '0;
      id_valid <= 1'b0;
    end else if (advance) begin
      if (pc_load)          pc <= pc_new;
      else if (!hold_front) pc <= pc + 32'd4;

      if (flush_front) begin
        id_valid <= 1'b0;
      end else if (!hold_front) begin
        id_instr <= i_rdata;
        id_pc    <= pc;
        id_valid <= 1'b1;
      end
    end
  end

  register_file u_rf (
    .clk, .rst_n,
    .raddr_a (rs_idx), .rdata_a (rf_a),
    .raddr_b (rt_idx), .rdata_b (rf_b),
    .we (wb_ctrl.rf_we), .waddr (wb_ctrl.waddr), .wdata (wb_data)
  );

  mips_decoder u_decoder (
    .instr (id_instr), .rs_idx, .rt_idx, .rf_a, .rf_b,
    .fwd_a, .fwd_b,
    .fwd_exe1 (alu_y), .fwd_exe2 (e2_res), .fwd_exe3 (e3_val), .fwd_wb (wb_data),
    .fmt, .dst_idx, .imm_ext, .op_a, .op_b, .store_data
  );

  core_control_unit #(
    .EXC_VECTOR (EXC_VECTOR), .INT_VECTOR (INT_VECTOR), .R0_ZERO (R0_ZERO)
  ) u_ccu (
    .clk, .rst_n,
    .dec_instr (id_instr), .dec_valid (id_valid), .dec_pc (id_pc),
    .dec_ctrl, .fwd_a, .fwd_b,
    .exe1_pc (e1_pc), .alu_ovf, .exe1_valid, .exe1_ctrl,
    .exe2_pc (e2_pc), .addr_err, .exe2_valid, .exe2_ctrl,
    .exe3_valid, .exe3_ctrl,
    .wb_ctrl,
    .bus_stall, .advance, .hold_front, .flush_front, .pc_load, .pc_new,
    .int_req, .int_ack, .ccb_we, .exc_cause, .exc_pc
  );

  // ---------------- EXE1 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_a <= '0; e1_b <= '0; e1_sd <= '0; e1_pc <= '0;
    end else if (advance) begin
      e1_a  <= op_a;
      e1_b  <= op_b;
      e1_sd <= store_data;
      e1_pc <= id_pc;
    end
  end

  alu u_alu (
    .op (exe1_ctrl.alu_op), .a (e1_a), .b (e1_b), .y (alu_y),
    .flag_z (alu_z), .flag_n (alu_n), .flag_c (alu_c), .ovf (alu_ovf)
  );

  multiplier u_mul (
    .clk, .rst_n, .en (advance),
    .mode16 (exe1_ctrl.mul_mode16), .is_signed (exe1_ctrl.mul_signed),
    .a (e1_a), .b (e1_b), .res16 (mul16), .res64 (mul64)
  );

  // ---------------- EXE2 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2_res <= '0; e2_sd <= '0; e2_pc <= '0;
    end else if (advance) begin
      e2_res <= alu_y;
      e2_sd  <= e1_sd;
      e2_pc  <= e1_pc;
    end
  end

  address_checker u_achk (
    .check (exe2_ctrl.addr_chk), .addr (e2_res), .err (addr_err)
  );

  assign e2_val = (exe2_ctrl.src == E2_MUL16) ? mul16 : e2_res;

  // ---------------- EXE3 (memory) ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e3_val <= '0; e3_sd <= '0;
    end else if (advance) begin
      e3_val <= e2_val;
      e3_sd  <= e2_sd;
    end
  end

  assign d_addr  = e3_val;
  assign d_wdata = e3_sd;
  assign d_we    = exe3_valid && exe3_ctrl.mem_store;
  assign d_re    = exe3_valid && exe3_ctrl.mem_load;
  assign e3_out  = (exe3_ctrl.src == E3_MUL32) ? mul64[XLEN-1:0] : e3_val;

  // ---------------- WRITE-BACK ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_pipe <= '0; wb_mem <= '0;
    end else if (advance) begin
      wb_pipe <= e3_out;
      wb_mem  <= d_rdata;
    end
  end

  assign wb_data = (wb_ctrl.wb_src == WB_MEM) ? wb_mem : wb_pipe;
endmodule
