// tb_ccu_decode1: self-checking test of CCU DECODE I.
// Every instruction of the subset, with random register fields, plus random
// words outside it, is decoded by two instances (register 0 writable, and
// register 0 kept at zero). Class, operand usage and count, destination, write
// enable, ALU opcode, immediate select, ALU cycles, safe state and the
// illegal flag are compared with a table written here; conditional execution,
// condition-register write and branch must stay low.
module tb_ccu_decode1;
  import coffee_pkg::*;
  logic [31:0] instr;
  logic valid;
  dec1_ctrl_t c, cz;
  int checks = 0, failures = 0;

  ccu_decode1 dut (.instr, .valid, .ctrl (c));
  ccu_decode1 #(.R0_ZERO (1'b1)) dut_z (.instr, .valid, .ctrl (cz));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [5:0] op; logic [5:0] fn; instr_t k; logic urs; logic urt; logic wr;
    alu_op_t alu; logic imm; int cyc; stage_t safe;
  } row_t;

  task automatic expect_row(row_t r);
    logic [4:0] d;
    logic [31:0] w;
    w = (r.op == 6'b000000 || r.op == 6'b011100) ? {r.op, 15'($urandom), 5'd0, r.fn} : {r.op, 26'($urandom)};
    if ($urandom_range(0, 7) == 0) w[15:11] = 5'd0;
    if ($urandom_range(0, 7) == 0) w[20:16] = 5'd0;
    instr = w; valid = 1; #1;
    d = r.imm ? w[20:16] : w[15:11];
    checks++;
    if (c.kind !== r.k || c.uses_rs !== r.urs || c.uses_rt !== r.urt ||
        c.n_operands !== 2'(r.urs) + 2'(r.urt) || c.dst !== d || c.rs !== w[25:21] || c.rt !== w[20:16] ||
        c.rf_we !== r.wr || c.alu_op !== r.alu || c.use_imm !== r.imm || c.alu_cycles !== 2'(r.cyc) ||
        c.safe_stage !== r.safe || c.illegal !== 1'b0 || c.cex || c.cr_we || c.is_branch ||
        cz.rf_we !== (r.wr && d != 0)) begin
      failures++;
      $display("FAIL %s w=%h kind=%s we=%b/%b alu=%s dst=%0d", r.k.name(), w, c.kind.name(), c.rf_we, r.wr, c.alu_op.name(), c.dst);
    end
  endtask

  initial begin
    row_t tbl [14] = '{
      '{6'h00, 6'h20, I_ADD,   1, 1, 1, ALU_ADD, 0, 1, STG_EXE1},
      '{6'h00, 6'h21, I_ADDU,  1, 1, 1, ALU_ADD, 0, 1, STG_DEC},
      '{6'h00, 6'h22, I_SUB,   1, 1, 1, ALU_SUB, 0, 1, STG_EXE1},
      '{6'h00, 6'h23, I_SUBU,  1, 1, 1, ALU_SUB, 0, 1, STG_DEC},
      '{6'h00, 6'h24, I_AND,   1, 1, 1, ALU_AND, 0, 1, STG_DEC},
      '{6'h00, 6'h25, I_OR,    1, 1, 1, ALU_OR,  0, 1, STG_DEC},
      '{6'h00, 6'h26, I_XOR,   1, 1, 1, ALU_XOR, 0, 1, STG_DEC},
      '{6'h1C, 6'h02, I_MUL,   1, 1, 1, ALU_ADD, 0, 3, STG_DEC},
      '{6'h08, 6'h00, I_ADDI,  1, 0, 1, ALU_ADD, 1, 1, STG_EXE1},
      '{6'h09, 6'h00, I_ADDIU, 1, 0, 1, ALU_ADD, 1, 1, STG_DEC},
      '{6'h0C, 6'h00, I_ANDI,  1, 0, 1, ALU_AND, 1, 1, STG_DEC},
      '{6'h0D, 6'h00, I_ORI,   1, 0, 1, ALU_OR,  1, 1, STG_DEC},
      '{6'h23, 6'h00, I_LW,    1, 0, 1, ALU_ADD, 1, 1, STG_EXE2},
      '{6'h2B, 6'h00, I_SW,    1, 1, 0, ALU_ADD, 1, 1, STG_EXE2}};
    repeat (200) foreach (tbl[i]) expect_row(tbl[i]);
    // NOP
    instr = 32'h0; valid = 1; #1;
    checks++;
    if (c.kind !== I_NOP || c.rf_we || c.illegal || c.uses_rs || c.uses_rt) begin failures++; $display("FAIL nop"); end
    // invalid slot
    instr = {6'h00, 20'($urandom), 6'h20}; valid = 0; #1;
    checks++;
    if (c.rf_we || c.illegal) begin failures++; $display("FAIL invalid slot"); end
    // illegal words: opcodes outside the subset, unknown function codes, shamt set
    repeat (2000) begin
      logic [31:0] w;
      logic [5:0] op;
      do begin
        w = $urandom; op = w[31:26];
      end while (op inside {6'h08, 6'h09, 6'h0C, 6'h0D, 6'h23, 6'h2B} ||
                 (op == 6'h00 && w[10:6] == 0 && w[5:0] inside {[6'h20:6'h26]}) ||
                 (op == 6'h1C && w[10:6] == 0 && w[5:0] == 6'h02) || w == 0);
      instr = w; valid = 1; #1;
      checks++;
      if (!c.illegal || c.kind !== I_ILLEGAL || c.rf_we) begin failures++; $display("FAIL illegal %h", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
