// tb_multiplier: self-checking test of the pipelined multiplier.
// A new operand pair enters every cycle (operands sampled on the edge that
// leaves EXE1). The 16x16 result must appear one edge later and the 64-bit
// 32x32 result two edges later; signed and unsigned modes are mixed at random,
// and cycles with `en` low must hold the pipeline.
module tb_multiplier;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, mode16, sgn;
  logic [31:0] a, b, res16;
  logic [63:0] res64;
  int checks = 0, failures = 0;

  multiplier dut (.clk, .rst_n, .en, .mode16, .is_signed (sgn), .a, .b, .res16, .res64);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] e16; logic [63:0] e64; } exp_t;
  exp_t q [$];

  function automatic exp_t ref_of(logic [31:0] x, logic [31:0] y, logic m16, logic s);
    exp_t e;
    logic signed [63:0] sx, sy;
    if (m16) begin
      sx = s ? 64'($signed(x[15:0])) : 64'(x[15:0]);
      sy = s ? 64'($signed(y[15:0])) : 64'(y[15:0]);
    end else begin
      sx = s ? 64'($signed(x)) : 64'(x);
      sy = s ? 64'($signed(y)) : 64'(y);
    end
    e.e16 = 32'(sx * sy);
    e.e64 = sx * sy;
    return e;
  endfunction

  initial begin
    exp_t prev, cur;
    logic prev_v = 0, prev_m16 = 0;
    en = 1; mode16 = 0; sgn = 1; a = 0; b = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      mode16 = 1'($urandom); sgn = 1'($urandom);
      case ($urandom_range(0, 3))
        0: begin a = 32'h8000_0000; b = $urandom; end
        1: begin a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      cur = ref_of(a, b, mode16, sgn);
      @(posedge clk);
      #1;
      if (en) begin
        // 16x16: valid one edge after the operands were sampled (in EXE2)
        if (mode16) begin
          checks++;
          if (res16 !== cur.e16) begin failures++; $display("FAIL res16 %h/%h", res16, cur.e16); end
        end
        // 32x32: valid two edges after sampling (in EXE3)
        if (prev_v && !prev_m16) begin
          checks++;
          if (res64 !== prev.e64) begin failures++; $display("FAIL res64 %h/%h", res64, prev.e64); end
        end
        prev = cur; prev_v = 1; prev_m16 = mode16;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
