// tb_master_control: self-checking test of the master-control entity.
// Random combinations of exception sources, interrupt request, stage validity,
// safe states and freeze. The oldest exception must win (EXE2 address, EXE1
// overflow, DECODE illegal, then interrupt), flush itself and every younger
// stage, load the right vector and report cause and PC; an interrupt may only
// be taken when EXE1 and EXE2 hold no instruction that can still fault.
module tb_master_control;
  import coffee_pkg::*;
  localparam logic [31:0] EV = 32'h0000_0100, IV = 32'h0000_0200;
  logic adv, dv, dill, v1, ovf, v2, aerr, ireq;
  stage_t s1, s2;
  logic [31:0] dpc, pc1, pc2, pcn, epc;
  logic kd, k1, k2, pl, iack, we;
  exc_cause_t cause;
  int checks = 0, failures = 0;
  int seen [8];

  master_control #(.EXC_VECTOR (EV), .INT_VECTOR (IV)) dut (
    .advance (adv), .dec_valid (dv), .dec_illegal (dill), .dec_pc (dpc),
    .exe1_valid (v1), .exe1_safe (s1), .exe1_ovf (ovf), .exe1_pc (pc1),
    .exe2_valid (v2), .exe2_safe (s2), .exe2_addr_err (aerr), .exe2_pc (pc2),
    .int_req (ireq), .kill_dec (kd), .kill_exe1 (k1), .kill_exe2 (k2),
    .pc_load (pl), .pc_new (pcn), .int_ack (iack), .ccb_we (we), .exc_cause (cause), .exc_pc (epc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stage_t st [3] = '{STG_DEC, STG_EXE1, STG_EXE2};
    repeat (6000) begin
      exc_cause_t ec; logic [31:0] epc_e, pcn_e; logic ekd, ek1, ek2, eint;
      adv = ($urandom_range(0, 7) != 0);
      dv = 1'($urandom); dill = ($urandom_range(0, 3) == 0);
      v1 = 1'($urandom); ovf = ($urandom_range(0, 3) == 0); s1 = st[$urandom_range(0, 2)];
      v2 = 1'($urandom); aerr = ($urandom_range(0, 3) == 0); s2 = st[$urandom_range(0, 2)];
      ireq = 1'($urandom);
      dpc = $urandom; pc1 = $urandom; pc2 = $urandom;
      #1;
      ec = EXC_NONE; epc_e = 0; pcn_e = EV; ekd = 0; ek1 = 0; ek2 = 0; eint = 0;
      if (adv) begin
        if (v2 && aerr)       begin ec = EXC_ADDR;     epc_e = pc2; ekd = 1; ek1 = 1; ek2 = 1; end
        else if (v1 && ovf)   begin ec = EXC_OVERFLOW; epc_e = pc1; ekd = 1; ek1 = 1; end
        else if (dv && dill)  begin ec = EXC_ILLEGAL;  epc_e = dpc; ekd = 1; end
        else if (ireq && dv && (!v1 || s1 != STG_EXE2) && (!v2 || 1'b1)) begin
          ec = EXC_INT; epc_e = dpc; ekd = 1; eint = 1; pcn_e = IV;
        end
      end
      seen[ec]++;
      checks++;
      if (cause !== ec || we !== (ec != EXC_NONE) || pl !== (ec != EXC_NONE) || iack !== eint ||
          kd !== ekd || k1 !== ek1 || k2 !== ek2 ||
          (ec != EXC_NONE && (epc !== epc_e || pcn !== pcn_e))) begin
        failures++;
        $display("FAIL cause=%s/%s kd%b k1%b k2%b pc=%h/%h", cause.name(), ec.name(), kd, k1, k2, pcn, pcn_e);
      end
    end
    checks++;
    if (seen[EXC_ADDR] == 0 || seen[EXC_OVERFLOW] == 0 || seen[EXC_ILLEGAL] == 0 || seen[EXC_INT] == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
