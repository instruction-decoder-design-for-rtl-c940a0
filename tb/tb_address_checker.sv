// tb_address_checker: self-checking test of the load/store address check.
// One instance with the default (whole address space) range, one with a
// restricted range; alignment, range limits and the check enable are covered.
module tb_address_checker;
  logic chk;
  logic [31:0] addr;
  logic err_full, err_rng;
  int checks = 0, failures = 0;

  address_checker dut_full (.check (chk), .addr, .err (err_full));
  address_checker #(.ADDR_LO (32'h0000_1000), .ADDR_HI (32'h0000_1FFC)) dut_rng (.check (chk), .addr, .err (err_rng));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic c, logic [31:0] a);
    logic ef, er;
    chk = c; addr = a; #1;
    ef = c && (a[1:0] != 0);
    er = c && ((a[1:0] != 0) || a < 32'h1000 || a > 32'h1FFC);
    checks++;
    if (err_full !== ef || err_rng !== er) begin
      failures++; $display("FAIL chk=%b addr=%h full %b/%b rng %b/%b", c, a, err_full, ef, err_rng, er);
    end
  endtask

  initial begin
    one(1, 32'h0); one(1, 32'h1); one(1, 32'h2); one(1, 32'h3); one(0, 32'h3);
    one(1, 32'h0FFC); one(1, 32'h1000); one(1, 32'h1FFC); one(1, 32'h2000); one(1, 32'h1002);
    repeat (2000) one(1'($urandom), $urandom_range(0, 32'h3000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
