// tb_ccu_decode5: self-checking test of CCU DECODE V.
// A random EXE3 instruction stream with random freeze cycles: the registered
// write-back controls (write enable, destination, memory-or-pipeline select)
// and both hazard reports (EXE3 and WRITE-BACK) are compared with a reference.
module tb_ccu_decode5;
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

  logic en, vin;
  logic [31:0] iin;
  hz_info_t ie3, iwb;
  wb_ctrl_t c;
  ccu_decode5 dut (.clk, .rst_n, .en, .instr_in (iin), .valid_in (vin), .info_exe3 (ie3), .info_wb (iwb), .ctrl (c));

  initial begin
    logic ew; logic [4:0] ed; logic emem; string k;
    en = 1; vin = 0; iin = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ew = 0; ed = 0; emem = 0;
    repeat (4000) begin
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
      vin = ($urandom_range(0, 7) != 0); iin = rand_word();
      #1;
      k = cls(iin);
      checks++;
      if (ie3.wr !== (vin && !(k inside {"nop", "sw", "ill"})) || ie3.ready !== !(k inside {"lw", "mul"})) begin
        failures++; $display("FAIL info_exe3 %s", k);
      end
      @(posedge clk);
      if (en) begin
        ew = vin && !(k inside {"nop", "sw", "ill"});
        ed = (iin[31:26] == 0 || iin[31:26] == 6'h1C) ? iin[15:11] : iin[20:16];
        emem = (k == "lw");
      end
      #1;
      checks++;
      if (c.rf_we !== ew || c.waddr !== ed || c.wb_src !== (emem ? WB_MEM : WB_PIPE) ||
          iwb.wr !== ew || iwb.dst !== ed || !iwb.ready) begin
        failures++; $display("FAIL wb we=%b/%b dst=%0d/%0d", c.rf_we, ew, c.waddr, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
