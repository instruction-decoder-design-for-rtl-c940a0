// mips_decoder: DECODE-stage datapath decoder for MIPS32 instruction words.
//
// The original core's DECODE stage decoded a 6-bit opcode and pulled its fields
// from fixed COFFEE positions (dreg 4..0, sreg1 9..5, sreg2 14..10). Here the
// same job is done for MIPS words:
//   * the format (R: opcode 0 or SPECIAL2, J: opcodes 2/3, otherwise I) selects
//     which fields are registers: rs = 25..21, rt = 20..16, and the destination
//     rd = 15..11 (R-type) or rt (I-type);
//   * the 16-bit immediate is zero-extended for ANDI/ORI and sign-extended for
//     ADDI/ADDIU/LW/SW;
//   * operand A is always the rs value; operand B is the rt value for R-type and
//     the extended immediate for I-type; the rt value is also passed on as store
//     data.
// Register values come from the register file or, when flow control selects
// it, from the forwarding network (EXE1 ALU output, EXE2, EXE3 or WRITE-BACK).
// Combinational; everything is registered into EXE1 by the pipeline.
module mips_decoder
  import coffee_pkg::*;
(
  input  logic [31:0]     instr,
  // register file read ports
  output logic [4:0]      rs_idx,
  output logic [4:0]      rt_idx,
  input  logic [XLEN-1:0] rf_a,
  input  logic [XLEN-1:0] rf_b,
  // forwarding network
  input  fwd_t            fwd_a,
  input  fwd_t            fwd_b,
  input  logic [XLEN-1:0] fwd_exe1,
  input  logic [XLEN-1:0] fwd_exe2,
  input  logic [XLEN-1:0] fwd_exe3,
  input  logic [XLEN-1:0] fwd_wb,
  // decoded results
  output fmt_t            fmt,
  output logic [4:0]      dst_idx,
  output logic [XLEN-1:0] imm_ext,
  output logic [XLEN-1:0] op_a,
  output logic [XLEN-1:0] op_b,
  output logic [XLEN-1:0] store_data
);
  logic            zext;
  logic [XLEN-1:0] val_a, val_b;

  function automatic logic [XLEN-1:0] pick(input fwd_t sel, input logic [XLEN-1:0] rf,
                                           input logic [XLEN-1:0] e1, input logic [XLEN-1:0] e2,
                                           input logic [XLEN-1:0] e3, input logic [XLEN-1:0] wb);
    unique case (sel)
      FWD_EXE1: return e1;
      FWD_EXE2: return e2;
      FWD_EXE3: return e3;
      FWD_WB:   return wb;
      default:  return rf;
    endcase
  endfunction

  always_comb begin
    fmt     = mips_fmt(instr);
    rs_idx  = instr[25:21];
    rt_idx  = instr[20:16];
    dst_idx = (fmt == FMT_R) ? instr[15:11] : instr[20:16];
    zext    = (instr[31:26] == OP_ANDI) || (instr[31:26] == OP_ORI);
    imm_ext = zext ? {16'h0, instr[15:0]} : {{16{instr[15]}}, instr[15:0]};

    val_a = pick(fwd_a, rf_a, fwd_exe1, fwd_exe2, fwd_exe3, fwd_wb);
    val_b = pick(fwd_b, rf_b, fwd_exe1, fwd_exe2, fwd_exe3, fwd_wb);

    op_a       = val_a;
    op_b       = (fmt == FMT_R) ? val_b : imm_ext;
    store_data = val_b;
  end
endmodule
