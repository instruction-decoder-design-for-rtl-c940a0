// coffee_pkg: types, encodings and decode functions shared by the MIPS-decoding
// COFFEE-style core.
//
// The core is a six-stage pipeline (FETCH, DECODE, EXE1, EXE2, EXE3, WRITE-BACK)
// whose decoders read MIPS32 machine code. The opcode travels down a parallel
// control pipeline and every control entity re-decodes it with the functions
// below, so each stage derives its own control signals from the instruction word
// instead of receiving a bundle of pre-decoded wires.
//
// Encodings: the standard MIPS32 opcode/function values for the supported subset
// (OR, ORI, XOR, AND, ANDI, ADD, ADDU, ADDI, ADDIU, SUB, SUBU, LW, SW, MUL and the
// all-zero NOP). Everything else decodes as illegal. The enumerations, the stage
// numbering and the exception cause codes are this design's own choice.
package coffee_pkg;

  localparam int XLEN = 32;
  localparam int NREG = 32;

  // MIPS32 primary opcodes (bits 31..26)
  localparam logic [5:0] OP_SPECIAL  = 6'b000000;
  localparam logic [5:0] OP_SPECIAL2 = 6'b011100;
  localparam logic [5:0] OP_J        = 6'b000010;
  localparam logic [5:0] OP_ADDI     = 6'b001000;
  localparam logic [5:0] OP_ADDIU    = 6'b001001;
  localparam logic [5:0] OP_ANDI     = 6'b001100;
  localparam logic [5:0] OP_ORI      = 6'b001101;
  localparam logic [5:0] OP_LW       = 6'b100011;
  localparam logic [5:0] OP_SW       = 6'b101011;

  // MIPS32 function codes (bits 5..0) under SPECIAL / SPECIAL2
  localparam logic [5:0] FN_ADD  = 6'b100000;
  localparam logic [5:0] FN_ADDU = 6'b100001;
  localparam logic [5:0] FN_SUB  = 6'b100010;
  localparam logic [5:0] FN_SUBU = 6'b100011;
  localparam logic [5:0] FN_AND  = 6'b100100;
  localparam logic [5:0] FN_OR   = 6'b100101;
  localparam logic [5:0] FN_XOR  = 6'b100110;
  localparam logic [5:0] FN_MUL  = 6'b000010;   // SPECIAL2

  typedef enum logic [3:0] {
    I_NOP, I_ADD, I_ADDU, I_SUB, I_SUBU, I_AND, I_OR, I_XOR,
    I_ADDI, I_ADDIU, I_ANDI, I_ORI, I_LW, I_SW, I_MUL, I_ILLEGAL
  } instr_t;

  // MIPS instruction format types
  typedef enum logic [1:0] { FMT_R, FMT_I, FMT_J, FMT_NONE } fmt_t;

  // ALU operation codes, decoded inside the ALU
  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSA
  } alu_op_t;

  // Pipeline stages
  typedef enum logic [2:0] {
    STG_FETCH, STG_DEC, STG_EXE1, STG_EXE2, STG_EXE3, STG_WB
  } stage_t;

  // Where the value travelling from EXE2 to EXE3 comes from
  typedef enum logic [1:0] { E2_ALU, E2_MUL16, E2_CR } exe2_src_t;
  // Where the value travelling from EXE3 to WRITE-BACK comes from
  typedef enum logic [1:0] { E3_PIPE, E3_MUL32, E3_CCB } exe3_src_t;
  // Register-file write data source in WRITE-BACK
  typedef enum logic { WB_PIPE, WB_MEM } wb_src_t;

  // Operand forwarding source chosen by flow control for the DECODE stage
  typedef enum logic [2:0] { FWD_RF, FWD_EXE1, FWD_EXE2, FWD_EXE3, FWD_WB } fwd_t;

  typedef enum logic [2:0] {
    EXC_NONE     = 3'd0,
    EXC_ILLEGAL  = 3'd1,
    EXC_OVERFLOW = 3'd2,
    EXC_ADDR     = 3'd3,
    EXC_INT      = 3'd4
  } exc_cause_t;

  // Controls produced combinationally by CCU DECODE I for the DECODE stage
  typedef struct packed {
    instr_t     kind;
    fmt_t       fmt;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] dst;
    logic       uses_rs;
    logic       uses_rt;
    logic [1:0] n_operands;
    logic       rf_we;
    alu_op_t    alu_op;
    logic       use_imm;
    logic [1:0] alu_cycles;
    logic       is_branch;
    logic       cex;        // conditional execution (always off for MIPS)
    logic       cr_we;      // condition register write (always off for MIPS)
    stage_t     safe_stage;
    logic       illegal;
  } dec1_ctrl_t;

  // Registered by CCU DECODE II, used in EXE1
  typedef struct packed {
    alu_op_t alu_op;
    logic    ovf_en;
    logic    mul_en;
    logic    mul_mode16;
    logic    mul_signed;
    logic    cop_en;     // co-processor register mapping (unused by the subset)
  } exe1_ctrl_t;

  // Registered by CCU DECODE III, used in EXE2
  typedef struct packed {
    exe2_src_t src;
    logic      dbus_re;
    logic      dbus_we;
    logic      addr_chk;
  } exe2_ctrl_t;

  // Registered by CCU DECODE IV, used in EXE3
  typedef struct packed {
    logic      mem_load;
    logic      mem_store;
    exe3_src_t src;
    wb_src_t   wb_src;
  } exe3_ctrl_t;

  // Registered by CCU DECODE V, used in WRITE-BACK
  typedef struct packed {
    logic       rf_we;
    logic [4:0] waddr;
    wb_src_t    wb_src;
  } wb_ctrl_t;

  // What flow and master control need to know about an instruction in a stage
  typedef struct packed {
    logic       wr;      // valid and writes a general purpose register
    logic [4:0] dst;     // destination register
    logic       ready;   // its result can already be forwarded from this stage
    stage_t     safe;    // last stage in which it may raise an exception
  } hz_info_t;

  // Instruction class of a MIPS word.
  function automatic instr_t mips_kind(input logic [31:0] ins);
    instr_t k;
    k = I_ILLEGAL;
    if (ins == 32'h0) k = I_NOP;
    else begin
      unique case (ins[31:26])
        OP_SPECIAL: begin
          if (ins[10:6] == 5'd0) begin
            unique case (ins[5:0])
              FN_ADD:  k = I_ADD;
              FN_ADDU: k = I_ADDU;
              FN_SUB:  k = I_SUB;
              FN_SUBU: k = I_SUBU;
              FN_AND:  k = I_AND;
              FN_OR:   k = I_OR;
              FN_XOR:  k = I_XOR;
              default: k = I_ILLEGAL;
            endcase
          end
        end
        OP_SPECIAL2: if (ins[10:6] == 5'd0 && ins[5:0] == FN_MUL) k = I_MUL;
        OP_ADDI:  k = I_ADDI;
        OP_ADDIU: k = I_ADDIU;
        OP_ANDI:  k = I_ANDI;
        OP_ORI:   k = I_ORI;
        OP_LW:    k = I_LW;
        OP_SW:    k = I_SW;
        default:  k = I_ILLEGAL;
      endcase
    end
    return k;
  endfunction

  function automatic fmt_t mips_fmt(input logic [31:0] ins);
    unique case (ins[31:26])
      OP_SPECIAL, OP_SPECIAL2: return FMT_R;
      OP_J, 6'b000011:         return FMT_J;
      default:                 return FMT_I;
    endcase
  endfunction

  // True for instructions that write a general purpose register.
  function automatic logic kind_writes_rf(input instr_t k);
    return !(k inside {I_NOP, I_SW, I_ILLEGAL});
  endfunction

  // Destination register index: rd for R-type, rt for I-type.
  function automatic logic [4:0] mips_dst(input logic [31:0] ins);
    return (mips_fmt(ins) == FMT_R) ? ins[15:11] : ins[20:16];
  endfunction

  // True when the result is produced by the ALU in EXE1 and can be forwarded
  // from EXE1 onwards. Loads and multiplications are ready only in WRITE-BACK.
  function automatic logic kind_alu_result(input instr_t k);
    return !(k inside {I_LW, I_MUL});
  endfunction

  // Last stage in which the instruction may still raise an exception.
  function automatic stage_t kind_safe_stage(input instr_t k);
    unique case (k)
      I_ADD, I_ADDI, I_SUB: return STG_EXE1;   // arithmetic overflow
      I_LW, I_SW:           return STG_EXE2;   // address check
      default:              return STG_DEC;    // illegal-instruction check
    endcase
  endfunction

  // Register write of a word; with r0_zero set, writes to register 0 are dropped
  // at decode so that register 0 stays zero.
  function automatic logic mips_writes(input logic [31:0] ins, input logic r0_zero);
    return kind_writes_rf(mips_kind(ins)) && !(r0_zero && mips_dst(ins) == 5'd0);
  endfunction

  // Hazard information for a valid instruction word in a given stage.
  function automatic hz_info_t mips_hz(input logic [31:0] ins, input logic valid,
                                       input logic r0_zero, input stage_t stg);
    hz_info_t h;
    instr_t   k;
    k       = mips_kind(ins);
    h.wr    = valid && mips_writes(ins, r0_zero);
    h.dst   = mips_dst(ins);
    h.ready = kind_alu_result(k) || (stg == STG_WB);
    h.safe  = kind_safe_stage(k);
    return h;
  endfunction

endpackage
