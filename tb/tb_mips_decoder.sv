// tb_mips_decoder: self-checking test of the DECODE-stage decoder.
// Random R-, I- and J-format words with random register values and random
// forwarding selections; register indices, destination, immediate extension
// (zero for ANDI/ORI, sign otherwise), operand A/B selection and store data are
// compared with values computed here from the MIPS32 field layout.
module tb_mips_decoder;
  import coffee_pkg::*;
  logic [31:0] instr, rf_a, rf_b, e1, e2, e3, wb, imm_ext, op_a, op_b, sd;
  logic [4:0] rs, rt, dst;
  fwd_t fa, fb;
  fmt_t fmt;
  int checks = 0, failures = 0;

  mips_decoder dut (.instr, .rs_idx (rs), .rt_idx (rt), .rf_a, .rf_b, .fwd_a (fa), .fwd_b (fb),
                    .fwd_exe1 (e1), .fwd_exe2 (e2), .fwd_exe3 (e3), .fwd_wb (wb),
                    .fmt, .dst_idx (dst), .imm_ext, .op_a, .op_b, .store_data (sd));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] sel(fwd_t f, logic [31:0] r);
    case (f)
      FWD_EXE1: return e1;
      FWD_EXE2: return e2;
      FWD_EXE3: return e3;
      FWD_WB:   return wb;
      default:  return r;
    endcase
  endfunction

  initial begin
    logic [5:0] ops [9] = '{6'b000000, 6'b011100, 6'b000010, 6'b001000, 6'b001001,
                            6'b001100, 6'b001101, 6'b100011, 6'b101011};
    repeat (5000) begin
      logic [5:0] op;
      logic isr, isj, zx;
      logic [31:0] eimm, ea, eb;
      op = ops[$urandom_range(0, 8)];
      instr = {op, 26'($urandom)};
      rf_a = $urandom; rf_b = $urandom; e1 = $urandom; e2 = $urandom; e3 = $urandom; wb = $urandom;
      fa = fwd_t'($urandom_range(0, 4)); fb = fwd_t'($urandom_range(0, 4));
      #1;
      isr  = (op == 6'b000000 || op == 6'b011100);
      isj  = (op == 6'b000010);
      zx   = (op == 6'b001100 || op == 6'b001101);
      eimm = zx ? {16'h0, instr[15:0]} : {{16{instr[15]}}, instr[15:0]};
      ea   = sel(fa, rf_a);
      eb   = sel(fb, rf_b);
      checks++;
      if (rs !== instr[25:21] || rt !== instr[20:16] ||
          dst !== (isr ? instr[15:11] : instr[20:16]) ||
          fmt !== (isr ? FMT_R : isj ? FMT_J : FMT_I) ||
          imm_ext !== eimm || op_a !== ea || op_b !== (isr ? eb : eimm) || sd !== eb) begin
        failures++;
        $display("FAIL instr=%h rs%0d rt%0d dst%0d imm %h/%h a %h/%h b %h sd %h", instr, rs, rt, dst,
                 imm_ext, eimm, op_a, ea, op_b, sd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
