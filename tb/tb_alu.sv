// tb_alu: self-checking test of the EXE1 ALU.
// Random and corner operands for every operation; result, Z/N/C flags and
// signed overflow are compared with a 33-bit reference computed here.
module tb_alu;
  import coffee_pkg::*;
  alu_op_t op;
  logic [31:0] a, b, y;
  logic z, n, c, ovf;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .flag_z (z), .flag_n (n), .flag_c (c), .ovf);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(alu_op_t o, logic [31:0] x, logic [31:0] w);
    logic [32:0] s;
    logic [31:0] ey;
    logic ec, eo;
    op = o; a = x; b = w;
    #1;
    ec = 0; eo = 0;
    case (o)
      ALU_ADD: begin s = {1'b0, x} + {1'b0, w}; ey = s[31:0]; ec = s[32];
               eo = ($signed(x) >= 0 && $signed(w) >= 0 && $signed(ey) < 0) ||
                    ($signed(x) < 0 && $signed(w) < 0 && $signed(ey) >= 0); end
      ALU_SUB: begin s = {1'b0, x} + {1'b0, ~w} + 33'd1; ey = x - w; ec = s[32];
               eo = ($signed(x) >= 0 && $signed(w) < 0 && $signed(ey) < 0) ||
                    ($signed(x) < 0 && $signed(w) >= 0 && $signed(ey) >= 0); end
      ALU_AND: ey = x & w;
      ALU_OR:  ey = x | w;
      ALU_XOR: ey = x ^ w;
      default: ey = x;
    endcase
    checks++;
    if (y !== ey || z !== (ey == 0) || n !== ey[31] || c !== ec || ovf !== eo) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h/%h z%b n%b c%b/%b ovf%b/%b", o.name(), x, w, y, ey, z, n, c, ec, ovf, eo);
    end
  endtask

  initial begin
    alu_op_t ops [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSA};
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h4000_0000};
    foreach (ops[i]) foreach (corner[j]) foreach (corner[k]) one(ops[i], corner[j], corner[k]);
    repeat (3000) one(ops[$urandom_range(0, 5)], $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
