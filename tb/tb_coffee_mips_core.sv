// tb_coffee_mips_core: end-to-end test of the MIPS-decoding pipeline at its
// default parameters.
//
// The testbench holds a word-addressed instruction memory and data memory
// (combinational reads), assembles small MIPS32 programs with its own encoder
// functions, resets the core, runs each program and checks register contents
// (read hierarchically from the register file), memory contents and the
// exception reports against values worked out by hand:
//   A  the arithmetic/logic test program of the subset (ORI, ADDU, ADDI, ADDIU,
//      SUB, SUBU, AND, ANDI, OR, XOR, ADD) including its one-instruction-per-
//      cycle timing: 14 instructions write back in 14 consecutive cycles;
//   B  SW/LW and MUL with dependent instructions right behind them (3-cycle
//      load-use and multiply-use stalls), run twice: once without and once with
//      random bus stalls, which must not change any result;
//   C  ADD overflow exception, D illegal instruction, E misaligned load,
//      F interrupt: each must report cause and PC, flush younger instructions,
//      keep older ones and restart at the vector.
// Each mechanism (forwarding from every stage, hazard stall, bus freeze, each
// exception, interrupt) is counted and must occur at least once.
module tb_coffee_mips_core;
  import coffee_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] i_addr, i_rdata, d_addr, d_wdata, d_rdata, exc_pc;
  logic        d_we, d_re, bus_stall, int_req, int_ack, ccb_we;
  exc_cause_t  exc_cause;

  logic [31:0] imem [0:255];
  logic [31:0] dmem [0:255];

  assign i_rdata = imem[i_addr[9:2]];
  assign d_rdata = dmem[d_addr[9:2]];
  always_ff @(posedge clk) if (d_we && !bus_stall) dmem[d_addr[9:2]] <= d_wdata;

  coffee_mips_core dut (
    .clk, .rst_n, .i_addr, .i_rdata, .d_addr, .d_wdata, .d_we, .d_re, .d_rdata,
    .bus_stall, .int_req, .int_ack, .ccb_we, .exc_cause, .exc_pc
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- encoders ----------------
  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_op(logic [5:0] op, int rt, int rs, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] mul_op(int rd, int rs, int rt);
    return {6'b011100, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'b000010};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_fwd [5];
  int n_hazard = 0, n_freeze = 0, n_int = 0;
  int n_exc [8];
  int n_wb = 0;
  int first_wb = -1, last_wb = -1;
  exc_cause_t last_cause;
  logic [31:0] last_epc;

  always @(posedge clk) if (rst_n) begin
    if (dut.advance && dut.id_valid && !dut.pc_load && !dut.hold_front) begin
      if (dut.u_ccu.dec_ctrl.uses_rs) n_fwd[dut.fwd_a]++;
      if (dut.u_ccu.dec_ctrl.uses_rt) n_fwd[dut.fwd_b]++;
    end
    if (dut.advance && dut.hold_front) n_hazard++;
    if (bus_stall) n_freeze++;
    if (ccb_we) begin
      n_exc[exc_cause]++;
      last_cause = exc_cause;
      last_epc   = exc_pc;
    end
    if (int_ack) n_int++;
    if (dut.advance && dut.wb_ctrl.rf_we) begin
      n_wb++;
      if (first_wb < 0) first_wb = cycle;
      last_wb = cycle;
    end
  end

  // ---------------- helpers ----------------
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] rf(int i);
    return dut.u_rf.regs[i];
  endfunction

  task automatic clear_mem();
    for (int i = 0; i < 256; i++) begin imem[i] = 32'h0; dmem[i] = 32'h0; end
  endtask

  task automatic reset_and_run(int ncycles);
    rst_n = 1'b0;
    n_wb = 0; first_wb = -1; last_wb = -1; last_cause = EXC_NONE; last_epc = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (ncycles) @(posedge clk);
    @(negedge clk);
  endtask

  logic random_stall = 1'b0;
  always @(negedge clk) bus_stall <= random_stall ? ($urandom_range(0, 3) == 0) : 1'b0;

  int hz0;

  initial begin
    int_req = 1'b0;
    bus_stall = 1'b0;
    foreach (n_fwd[i]) n_fwd[i] = 0;
    foreach (n_exc[i]) n_exc[i] = 0;

    // ===== A: arithmetic/logic program =====
    clear_mem();
    imem[0]  = i_op(OP_ORI,   8, 0, 16'h2);
    imem[1]  = i_op(OP_ORI,   9, 0, 16'h3);
    imem[2]  = r_op(FN_ADDU, 10, 8, 9);
    imem[3]  = i_op(OP_ADDI, 11, 10, 16'h1);
    imem[4]  = i_op(OP_ADDIU,12, 11, 16'h4);
    imem[5]  = r_op(FN_SUB,  13, 12, 11);
    imem[6]  = r_op(FN_SUB,  14, 11, 12);
    imem[7]  = r_op(FN_SUBU, 15, 11, 12);
    imem[8]  = r_op(FN_SUBU, 16, 12, 11);
    imem[9]  = r_op(FN_AND,  17, 8, 9);
    imem[10] = i_op(OP_ANDI, 18, 9, 16'h0);
    imem[11] = r_op(FN_OR,   19, 8, 9);
    imem[12] = r_op(FN_XOR,  20, 8, 9);
    imem[13] = r_op(FN_ADD,  22, 8, 9);
    reset_and_run(40);
    check("A r8",  rf(8),  32'd2);
    check("A r9",  rf(9),  32'd3);
    check("A r10", rf(10), 32'd5);
    check("A r11", rf(11), 32'd6);
    check("A r12", rf(12), 32'd10);
    check("A r13", rf(13), 32'd4);
    check("A r14", rf(14), -32'sd4);
    check("A r15", rf(15), -32'sd4);
    check("A r16", rf(16), 32'd4);
    check("A r17", rf(17), 32'b00010);
    check("A r18", rf(18), 32'd0);
    check("A r19", rf(19), 32'd3);
    check("A r20", rf(20), 32'd1);
    check("A r22", rf(22), 32'd5);
    check("A r0",  rf(0),  32'd0);
    check("A writes", n_wb, 14);
    check("A one per cycle", last_wb - first_wb, 13);
    check("A no exception", n_exc[EXC_ILLEGAL] + n_exc[EXC_OVERFLOW], 0);
    // sign/zero extension: ADDIU sign-extends, ORI zero-extends
    clear_mem();
    imem[0] = i_op(OP_ADDIU, 1, 0, 16'hFFFE);
    imem[1] = i_op(OP_ORI,   2, 0, 16'hFFFE);
    imem[2] = i_op(OP_ANDI,  3, 1, 16'h8001);
    reset_and_run(20);
    check("ext addiu", rf(1), 32'hFFFF_FFFE);
    check("ext ori",   rf(2), 32'h0000_FFFE);
    check("ext andi",  rf(3), 32'h0000_8000);

    // ===== B: memory, multiply, hazards; then again with bus stalls =====
    for (int pass = 0; pass < 2; pass++) begin
      clear_mem();
      dmem[17] = 32'h1234_5678;                       // address 0x44
      imem[0]  = i_op(OP_ORI,  1, 0, 16'h40);         // r1 = 0x40
      imem[1]  = i_op(OP_ORI,  2, 0, 16'h7);          // r2 = 7
      imem[2]  = i_op(OP_ORI,  3, 0, 16'h6);          // r3 = 6
      imem[3]  = i_op(OP_SW,   2, 1, 16'h0);          // mem[0x40] = 7 (store data forwarded)
      imem[4]  = i_op(OP_LW,   4, 1, 16'h4);          // r4 = mem[0x44]
      imem[5]  = r_op(FN_ADDU, 5, 4, 4);              // load-use: r5 = 2*r4
      imem[6]  = mul_op(6, 2, 3);                     // r6 = 42
      imem[7]  = r_op(FN_ADDU, 7, 6, 2);              // mul-use: r7 = 49
      imem[8]  = i_op(OP_LW,   8, 1, 16'h0);          // r8 = 7 (stored above)
      imem[9]  = i_op(OP_ADDIU,9, 0, 16'hFFFD);       // r9 = -3
      imem[10] = mul_op(10, 9, 3);                    // r10 = -18
      imem[11] = i_op(OP_SW,  10, 1, 16'h8);          // mem[0x48] = -18
      imem[12] = r_op(FN_ADDU,11, 8, 0);              // r11 = r8 (load two back)
      random_stall = (pass == 1);
      hz0 = n_hazard;
      reset_and_run(pass == 0 ? 40 : 120);
      random_stall = 1'b0;
      check($sformatf("B%0d r4", pass),  rf(4),  32'h1234_5678);
      check($sformatf("B%0d r5", pass),  rf(5),  32'h2468_ACF0);
      check($sformatf("B%0d r6", pass),  rf(6),  32'd42);
      check($sformatf("B%0d r7", pass),  rf(7),  32'd49);
      check($sformatf("B%0d r8", pass),  rf(8),  32'd7);
      check($sformatf("B%0d r10", pass), rf(10), -32'sd18);
      check($sformatf("B%0d r11", pass), rf(11), 32'd7);
      check($sformatf("B%0d m40", pass), dmem[16], 32'd7);
      check($sformatf("B%0d m48", pass), dmem[18], -32'sd18);
      if (pass == 0) begin
        // LW->use: 3, MUL->use: 3, r9 forwarded to MUL: 0, MUL->SW: 3;
        // LW r8 has written back before ADDU r11 reaches DECODE: 0
        check("B0 stall cycles", n_hazard - hz0, 9);
      end
    end

    // ===== C: ADD overflow =====
    clear_mem();
    imem[0] = i_op(OP_ORI, 3, 0, 16'h8000);           // r3 = 0x8000
    imem[1] = mul_op(4, 3, 3);                        // r4 = 0x4000_0000
    imem[2] = r_op(FN_ADDU, 6, 4, 4);                 // no trap: r6 = 0x8000_0000
    imem[3] = r_op(FN_ADD, 5, 4, 4);                  // overflow -> exception
    imem[4] = i_op(OP_ORI, 26, 0, 16'h55);            // must be flushed
    imem[5] = i_op(OP_ORI, 27, 0, 16'h66);            // must be flushed
    imem[64] = i_op(OP_ORI, 28, 0, 16'h1234);         // handler at 0x100
    reset_and_run(40);
    check("C cause", last_cause, EXC_OVERFLOW);
    check("C epc",   last_epc, 32'hC);
    check("C r6 addu no trap", rf(6), 32'h8000_0000);
    check("C r5 not written",  rf(5), 32'h0);
    check("C r26 flushed",     rf(26), 32'h0);
    check("C r27 flushed",     rf(27), 32'h0);
    check("C handler ran",     rf(28), 32'h1234);

    // ===== D: illegal instruction =====
    clear_mem();
    imem[0] = i_op(OP_ORI, 1, 0, 16'h11);
    imem[1] = i_op(OP_ORI, 2, 0, 16'h22);
    imem[2] = 32'hFC00_0000;                          // opcode 111111: not implemented
    imem[3] = i_op(OP_ORI, 3, 0, 16'h33);
    imem[64] = i_op(OP_ORI, 28, 0, 16'h4321);
    reset_and_run(30);
    check("D cause", last_cause, EXC_ILLEGAL);
    check("D epc", last_epc, 32'h8);
    check("D r2 kept", rf(2), 32'h22);
    check("D r3 flushed", rf(3), 32'h0);
    check("D handler ran", rf(28), 32'h4321);

    // ===== E: misaligned load =====
    clear_mem();
    imem[0] = i_op(OP_ORI, 1, 0, 16'h11);
    imem[1] = i_op(OP_LW,  2, 0, 16'h2);              // address 2: misaligned
    imem[2] = i_op(OP_ORI, 3, 0, 16'h33);
    imem[3] = i_op(OP_ORI, 4, 0, 16'h44);
    imem[64] = i_op(OP_ORI, 28, 0, 16'h5555);
    reset_and_run(30);
    check("E cause", last_cause, EXC_ADDR);
    check("E epc", last_epc, 32'h4);
    check("E r1 kept", rf(1), 32'h11);
    check("E r3 flushed", rf(3), 32'h0);
    check("E r4 flushed", rf(4), 32'h0);
    check("E handler ran", rf(28), 32'h5555);

    // ===== F: interrupt =====
    clear_mem();
    for (int i = 0; i < 30; i++) imem[i] = i_op(OP_ORI, i + 1, 0, 16'(i + 1));
    imem[128] = i_op(OP_ORI, 31, 0, 16'hBEEF);        // handler at 0x200
    fork
      reset_and_run(50);
      begin
        repeat (12) @(posedge clk);
        @(negedge clk) int_req = 1'b1;
        while (!int_ack) @(posedge clk);
        @(negedge clk) int_req = 1'b0;
      end
    join
    check("F cause", last_cause, EXC_INT);
    checks++;
    if (last_epc[1:0] != 0 || last_epc >= 32'd120 || last_epc == 0) begin
      failures++; $display("FAIL F epc %h", last_epc);
    end
    begin
      int k;
      k = int'(last_epc >> 2);       // index of the interrupted instruction
      check("F last kept",    rf(k),     32'(k));       // instruction k-1 writes r(k)
      check("F first flushed", rf(k + 1), 32'h0);
      check("F handler ran",  rf(31), 32'hBEEF);
    end

    // ===== mechanism coverage =====
    $display("fwd rf=%0d exe1=%0d exe2=%0d exe3=%0d wb=%0d hazard=%0d freeze=%0d",
             n_fwd[FWD_RF], n_fwd[FWD_EXE1], n_fwd[FWD_EXE2], n_fwd[FWD_EXE3], n_fwd[FWD_WB],
             n_hazard, n_freeze);
    $display("exceptions: illegal=%0d overflow=%0d addr=%0d int=%0d acks=%0d",
             n_exc[EXC_ILLEGAL], n_exc[EXC_OVERFLOW], n_exc[EXC_ADDR], n_exc[EXC_INT], n_int);
    checks += 9;
    if (n_fwd[FWD_EXE1] == 0) begin failures++; $display("FAIL no EXE1 forwarding"); end
    if (n_fwd[FWD_EXE2] == 0) begin failures++; $display("FAIL no EXE2 forwarding"); end
    if (n_fwd[FWD_EXE3] == 0) begin failures++; $display("FAIL no EXE3 forwarding"); end
    if (n_fwd[FWD_WB]   == 0) begin failures++; $display("FAIL no WB forwarding"); end
    if (n_hazard == 0) begin failures++; $display("FAIL no hazard stall"); end
    if (n_freeze == 0) begin failures++; $display("FAIL no bus freeze"); end
    if (n_exc[EXC_OVERFLOW] == 0 || n_exc[EXC_ILLEGAL] == 0) begin failures++; $display("FAIL exc"); end
    if (n_exc[EXC_ADDR] == 0) begin failures++; $display("FAIL addr exc"); end
    if (n_int == 0) begin failures++; $display("FAIL no interrupt"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
