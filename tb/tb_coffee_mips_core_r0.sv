// tb_coffee_mips_core_r0: checks the two register-0 modes of the core side by
// side.
//
// Two cores run the same program from the same instruction and data memories
// (combinational reads, no stores). One core is built with R0_ZERO=0, the
// original core's behaviour, where register 0 is an ordinary register. The
// other is built with R0_ZERO=1, the MIPS convention, where every write to
// register 0 is dropped at decode. The program writes register 0 by ORI and by
// LW, and then reads it back with and without a forwarding path in between.
// The testbench works out the results of both modes by hand.
//
// It also counts the load-use stall cycles. The LW into register 0 costs three
// stall cycles when register 0 is writable. It costs none when register 0 is
// tied to zero, because the load then has no destination to wait for.
module tb_coffee_mips_core_r0;
  import coffee_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] imem [0:63];
  logic [31:0] dmem [0:63];

  logic [31:0] i_addr   [2];
  logic [31:0] d_addr   [2];
  logic [31:0] d_wdata  [2];
  logic [31:0] exc_pc   [2];
  logic        d_we     [2];
  logic        d_re     [2];
  logic        int_ack  [2];
  logic        ccb_we   [2];
  exc_cause_t  exc_cause[2];

  coffee_mips_core #(.R0_ZERO(1'b0)) u_free (
    .clk, .rst_n, .i_addr(i_addr[0]), .i_rdata(imem[i_addr[0][7:2]]),
    .d_addr(d_addr[0]), .d_wdata(d_wdata[0]), .d_we(d_we[0]), .d_re(d_re[0]),
    .d_rdata(dmem[d_addr[0][7:2]]), .bus_stall(1'b0), .int_req(1'b0),
    .int_ack(int_ack[0]), .ccb_we(ccb_we[0]), .exc_cause(exc_cause[0]), .exc_pc(exc_pc[0])
  );

  coffee_mips_core #(.R0_ZERO(1'b1)) u_zero (
    .clk, .rst_n, .i_addr(i_addr[1]), .i_rdata(imem[i_addr[1][7:2]]),
    .d_addr(d_addr[1]), .d_wdata(d_wdata[1]), .d_we(d_we[1]), .d_re(d_re[1]),
    .d_rdata(dmem[d_addr[1][7:2]]), .bus_stall(1'b0), .int_req(1'b0),
    .int_ack(int_ack[1]), .ccb_we(ccb_we[1]), .exc_cause(exc_cause[1]), .exc_pc(exc_pc[1])
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_op(logic [5:0] op, int rt, int rs, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // stall cycles and exception reports of each core
  int n_stall [2];
  int n_exc   [2];
  always @(posedge clk) if (rst_n) begin
    if (u_free.advance && u_free.hold_front) n_stall[0]++;
    if (u_zero.advance && u_zero.hold_front) n_stall[1]++;
    if (ccb_we[0]) n_exc[0]++;
    if (ccb_we[1]) n_exc[1]++;
  end

  initial begin
    n_stall[0] = 0; n_stall[1] = 0; n_exc[0] = 0; n_exc[1] = 0;
    for (int i = 0; i < 64; i++) begin imem[i] = 32'h0; dmem[i] = 32'h0; end
    dmem[1] = 32'h0000_0040;

    imem[0] = i_op(OP_ORI,  0, 0, 16'h0010);  // r0 = r0 | 0x10
    imem[1] = i_op(OP_ORI,  1, 0, 16'h0003);  // r1 = r0 | 3   (forwarded from EXE1)
    imem[2] = 32'h0;                           // NOP
    imem[3] = 32'h0;
    imem[4] = 32'h0;
    imem[5] = 32'h0;
    imem[6] = r_op(FN_ADDU, 2, 0, 1);         // r2 = r0 + r1  (from the register file)
    imem[7] = i_op(OP_LW,   0, 0, 16'h0004);  // r0 = mem[r0 + 4]
    imem[8] = r_op(FN_ADDU, 3, 0, 1);         // r3 = r0 + r1  (load-use)
    imem[9] = i_op(OP_ADDIU, 4, 0, 16'h0001); // r4 = r0 + 1
    // NOPs follow up to the end of the memory

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (40) @(posedge clk);
    @(negedge clk);

    // R0_ZERO=0: r0 = 0x10, r1 = 0x13, r2 = 0x23; the load reads
    // mem[0x10 + 4] = dmem[5] = 0, so r0 = 0, r3 = 0x13, r4 = 1.
    check("free r0", u_free.u_rf.regs[0], 32'h0);
    check("free r1", u_free.u_rf.regs[1], 32'h13);
    check("free r2", u_free.u_rf.regs[2], 32'h23);
    check("free r3", u_free.u_rf.regs[3], 32'h13);
    check("free r4", u_free.u_rf.regs[4], 32'h1);
    check("free load-use stall cycles", n_stall[0], 3);

    // R0_ZERO=1: every write to r0 is dropped, so r0 stays 0 throughout;
    // r1 = 3, r2 = 3, the load reads dmem[1] but is discarded, r3 = 3, r4 = 1.
    check("zero r0", u_zero.u_rf.regs[0], 32'h0);
    check("zero r1", u_zero.u_rf.regs[1], 32'h3);
    check("zero r2", u_zero.u_rf.regs[2], 32'h3);
    check("zero r3", u_zero.u_rf.regs[3], 32'h3);
    check("zero r4", u_zero.u_rf.regs[4], 32'h1);
    check("zero load-use stall cycles", n_stall[1], 0);

    check("free exceptions", n_exc[0], 0);
    check("zero exceptions", n_exc[1], 0);

    $display("stalls: free=%0d zero=%0d", n_stall[0], n_stall[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
