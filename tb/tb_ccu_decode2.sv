// tb_ccu_decode2: self-checking test of CCU DECODE II.
// A random instruction stream with random freeze (en low) and bubble cycles;
// after each clock the registered EXE1 controls, instruction and valid bit are
// compared with a one-entry reference pipeline register kept here.
module tb_ccu_decode2;
  import coffee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random word: mostly from the implemented subset, sometimes not
  function automatic logic [31:0] rand_word();
    logic [5:0] ops [8] = '{6'h08, 6'h09, 6'h0C, 6'h0D, 6'h23, 6'h2B, 6'h3F, 6'h04};
    logic [5:0] fns [8] = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27};
    case ($urandom_range(0, 3))
      0: return {6'h00, 15'($urandom), 5'd0, fns[$urandom_range(0, 7)]};
      1: return {6'h1C, 15'($urandom), 5'd0, 6'h02};
      2: return 32'h0;
      default: return {ops[$urandom_range(0, 7)], 26'($urandom)};
    endcase
  endfunction

  // reference classification, written from the MIPS32 encodings
  function automatic string cls(logic [31:0] w);
    if (w == 0) return "nop";
    case (w[31:26])
      6'h00: if (w[10:6] == 0) case (w[5:0])
               6'h20: return "add"; 6'h21: return "addu"; 6'h22: return "sub"; 6'h23: return "subu";
               6'h24: return "and"; 6'h25: return "or";   6'h26: return "xor";
               default: return "ill"; endcase
      6'h1C: if (w[10:6] == 0 && w[5:0] == 6'h02) return "mul";
      6'h08: return "addi"; 6'h09: return "addiu"; 6'h0C: return "andi"; 6'h0D: return "ori";
      6'h23: return "lw";   6'h2B: return "sw";
      default: return "ill";
    endcase
    return "ill";
  endfunction

  logic en, bubble, vin, vout;
  logic [31:0] iin, iout;
  exe1_ctrl_t c;
  ccu_decode2 dut (.clk, .rst_n, .en, .bubble, .instr_in (iin), .valid_in (vin),
                   .instr_out (iout), .valid_out (vout), .ctrl (c));

  initial begin
    logic ev; logic [31:0] ei; string k;
    en = 1; bubble = 0; vin = 0; iin = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (vout !== 0 || c !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    ev = 0; ei = 0;
    repeat (4000) begin
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0); bubble = ($urandom_range(0, 5) == 0);
      vin = ($urandom_range(0, 7) != 0); iin = rand_word();
      @(posedge clk);
      if (en) begin ev = vin && !bubble; ei = iin; end
      #1;
      k = cls(ei);
      checks++;
      if (vout !== ev || iout !== ei ||
          (ev && (c.ovf_en !== (k == "add" || k == "addi" || k == "sub") ||
                  c.mul_en !== (k == "mul") || c.mul_mode16 || c.cop_en ||
                  c.alu_op !== ((k == "sub" || k == "subu") ? ALU_SUB : (k == "and" || k == "andi") ? ALU_AND :
                                (k == "or" || k == "ori") ? ALU_OR : (k == "xor") ? ALU_XOR : ALU_ADD))) ||
          (!ev && c !== '0)) begin
        failures++; $display("FAIL %s v=%b/%b ovf=%b mul=%b alu=%s", k, vout, ev, c.ovf_en, c.mul_en, c.alu_op.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
