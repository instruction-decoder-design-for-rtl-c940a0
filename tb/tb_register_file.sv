// tb_register_file: self-checking test of the register bank.
// Checks that reset clears every register, then performs random writes and
// reads on both ports against a model array, including register 0.
module tb_register_file;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] ra, rb, wa;
  logic [31:0] da, db, wd;
  logic we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.clk, .rst_n, .raddr_a (ra), .rdata_a (da), .raddr_b (rb), .rdata_b (db),
                     .we, .waddr (wa), .wdata (wd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      model[i] = 0;
      ra = 5'(i); rb = 5'(31 - i); #1;
      checks++;
      if (da !== 0 || db !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    repeat (2000) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) != 0);
      wa = 5'($urandom); wd = $urandom;
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      checks++;
      if (da !== model[ra] || db !== model[rb]) begin
        failures++; $display("FAIL read ra=%0d %h/%h rb=%0d %h/%h", ra, da, model[ra], rb, db, model[rb]);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
