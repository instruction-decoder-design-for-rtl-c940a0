// tb_core_control_unit: self-checking test of the Core Control Unit.
// The testbench plays the FETCH stage: it offers instruction words to the
// DECODE input, holds them while hold_front is high and stops after a
// flush_front. For each scenario the control outputs are checked cycle by
// cycle against the timing worked out by hand:
//   1 LW then a dependent ADDU: 3 stall cycles, then forwarding from
//     WRITE-BACK; LW's controls appear one stage per cycle (EXE1 valid, bus
//     read in EXE2, memory load in EXE3, memory write-back in WRITE-BACK).
//   2 ADDU chain: forwarding from EXE1, EXE2 and EXE3, never a stall.
//   3 bus stall: nothing moves while it is high.
//   4 overflow in EXE1, 5 address error in EXE2, 6 illegal word, 7 interrupt:
//     cause, PC and the flushed stages.
module tb_core_control_unit;
  import coffee_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] dec_instr, dec_pc, e1pc, e2pc, pc_new, exc_pc;
  logic dec_valid, alu_ovf, addr_err, bus_stall, int_req;
  dec1_ctrl_t dctl; exe1_ctrl_t c1; exe2_ctrl_t c2; exe3_ctrl_t c3; wb_ctrl_t cw;
  fwd_t fa, fb;
  logic v1, v2, v3, adv, hold, flush, pl, iack, ccb;
  exc_cause_t cause;
  int checks = 0, failures = 0;

  core_control_unit dut (
    .clk, .rst_n, .dec_instr, .dec_valid, .dec_pc, .dec_ctrl (dctl), .fwd_a (fa), .fwd_b (fb),
    .exe1_pc (e1pc), .alu_ovf, .exe1_valid (v1), .exe1_ctrl (c1),
    .exe2_pc (e2pc), .addr_err, .exe2_valid (v2), .exe2_ctrl (c2),
    .exe3_valid (v3), .exe3_ctrl (c3), .wb_ctrl (cw),
    .bus_stall, .advance (adv), .hold_front (hold), .flush_front (flush), .pc_load (pl), .pc_new,
    .int_req, .int_ack (iack), .ccb_we (ccb), .exc_cause (cause), .exc_pc);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {6'b0, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_op(logic [5:0] op, int rt, int rs, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  // ---------------- fetch model ----------------
  logic [31:0] prog [16];
  int plen = 0, ptr = 0, cyc = 0;
  logic stopped = 0;
  assign dec_valid = !stopped && ptr < plen;
  assign dec_instr = (ptr < plen) ? prog[ptr] : 32'h0;
  assign dec_pc    = 32'(ptr * 4);
  // PCs of EXE1/EXE2 follow the control pipeline
  always_ff @(posedge clk) if (adv) begin e1pc <= dec_pc; e2pc <= e1pc; end
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (adv) begin
      if (flush) stopped <= 1;
      else if (!hold && ptr < plen) ptr <= ptr + 1;
    end
  end

  task automatic start(int n);
    rst_n = 0; ptr = 0; plen = n; stopped = 0;
    alu_ovf = 0; addr_err = 0; bus_stall = 0; int_req = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; cyc = 0;
    #1;
  endtask

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL [cyc %0d] %s", cyc, what); end
  endtask

  task automatic step();
    @(negedge clk); #1;
  endtask

  initial begin
    int nh;
    // ----- 1: LW then dependent ADDU -----
    prog[0] = i_op(OP_LW, 4, 1, 16'h0);
    prog[1] = r_op(FN_ADDU, 5, 4, 4);
    start(2);
    chk("1 LW decoded, no stall", !hold && dctl.kind == I_LW);
    step();
    chk("1 LW in EXE1", v1 && c1.alu_op == ALU_ADD && !c1.ovf_en);
    chk("1 stall c1", hold);
    step();
    chk("1 LW bus read in EXE2", v2 && c2.dbus_re && c2.addr_chk && !c2.dbus_we);
    chk("1 stall c2", hold);
    step();
    chk("1 LW memory load in EXE3", v3 && c3.mem_load && c3.wb_src == WB_MEM);
    chk("1 stall c3", hold);
    step();
    chk("1 LW write-back from memory", cw.rf_we && cw.waddr == 4 && cw.wb_src == WB_MEM);
    chk("1 ADDU forwarded from WB", !hold && fa == FWD_WB && fb == FWD_WB);
    step();
    chk("1 ADDU in EXE1, bubble ahead of it", v1 && !v2);

    // ----- 2: forwarding chain -----
    prog[0] = r_op(FN_ADDU, 1, 2, 3);
    prog[1] = r_op(FN_ADDU, 6, 1, 7);     // r1 from EXE1
    prog[2] = r_op(FN_ADDU, 8, 9, 1);     // r1 from EXE2
    prog[3] = r_op(FN_ADDU, 10, 1, 1);    // r1 from EXE3
    prog[4] = r_op(FN_ADDU, 11, 1, 0);    // r1 from WB
    start(5);
    nh = 0;
    step(); chk("2 fwd EXE1", fa == FWD_EXE1 && fb == FWD_RF); nh += hold;
    step(); chk("2 fwd EXE2", fb == FWD_EXE2 && fa == FWD_RF); nh += hold;
    step(); chk("2 fwd EXE3", fa == FWD_EXE3 && fb == FWD_EXE3); nh += hold;
    step(); chk("2 fwd WB",   fa == FWD_WB); nh += hold;
    chk("2 no stall", nh == 0);

    // ----- 3: bus stall freezes the pipeline -----
    prog[0] = r_op(FN_ADDU, 1, 2, 3);
    prog[1] = r_op(FN_ADDU, 4, 5, 6);
    start(2);
    step();
    bus_stall = 1; #1;
    chk("3 frozen", !adv);
    repeat (3) step();
    chk("3 held EXE1", v1 && !v2 && ptr == 1);
    bus_stall = 0;
    step();
    chk("3 moves again", v1 && v2 && ptr == 2);

    // ----- 4: overflow in EXE1 -----
    prog[0] = r_op(FN_ADD, 1, 2, 3);
    prog[1] = r_op(FN_ADDU, 4, 5, 6);
    start(2);
    step();
    chk("4 ADD has overflow check", v1 && c1.ovf_en);
    alu_ovf = 1; #1;
    chk("4 exception", ccb && cause == EXC_OVERFLOW && exc_pc == 0 && pl && flush && pc_new == 32'h100);
    step(); alu_ovf = 0; #1;
    chk("4 ADD and ADDU flushed", !v1 && !v2);
    // ADDU must not raise on the same flag
    prog[0] = r_op(FN_ADDU, 1, 2, 3);
    start(1);
    step(); alu_ovf = 1; #1;
    chk("4 ADDU ignores overflow", !ccb);
    alu_ovf = 0;

    // ----- 5: address error in EXE2 -----
    prog[0] = i_op(OP_SW, 1, 2, 16'h2);
    prog[1] = r_op(FN_ADDU, 4, 5, 6);
    prog[2] = r_op(FN_ADDU, 7, 5, 6);
    start(3);
    step(); step();
    chk("5 SW in EXE2", v2 && c2.dbus_we && c2.addr_chk);
    addr_err = 1; #1;
    chk("5 exception", ccb && cause == EXC_ADDR && exc_pc == 0);
    step(); addr_err = 0; #1;
    chk("5 all flushed", !v1 && !v2 && !v3);

    // ----- 6: illegal word -----
    prog[0] = r_op(FN_ADDU, 1, 2, 3);
    prog[1] = 32'hFC00_0000;
    start(2);
    step();
    chk("6 illegal", ccb && cause == EXC_ILLEGAL && exc_pc == 4);
    step();
    chk("6 illegal flushed, older kept", !v1 && v2);

    // ----- 7: interrupt waits until EXE1 is past its safe state -----
    prog[0] = i_op(OP_LW, 1, 2, 16'h0);
    prog[1] = r_op(FN_ADDU, 3, 4, 5);
    prog[2] = r_op(FN_ADDU, 6, 4, 5);
    start(3);
    chk("7 quiet before request", !iack);
    step();
    int_req = 1; #1;
    chk("7 not taken while LW in EXE1", !iack && v1);
    step();
    chk("7 taken", iack && cause == EXC_INT && exc_pc == 8 && pc_new == 32'h200);
    int_req = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
