// tb_flow_control: self-checking test of the flow-control entity.
// Random DECODE register usage against random hazard reports from EXE1, EXE2,
// EXE3 and WRITE-BACK (with many register-index collisions). The forwarding
// source of each operand must be the youngest older writer, the stall must be
// raised exactly when that writer's result is not ready yet, and a bus stall
// must stop the pipeline.
module tb_flow_control;
  import coffee_pkg::*;
  logic dec_valid, bus_stall, hz, adv;
  dec1_ctrl_t dec;
  hz_info_t i1, i2, i3, iw;
  fwd_t fa, fb;
  int checks = 0, failures = 0;

  flow_control dut (.dec_valid, .dec, .info_exe1 (i1), .info_exe2 (i2), .info_exe3 (i3), .info_wb (iw),
                    .bus_stall, .fwd_a (fa), .fwd_b (fb), .hazard_stall (hz), .advance (adv));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic hz_info_t rnd_info(logic wb);
    hz_info_t h;
    h.wr = 1'($urandom); h.dst = 5'($urandom_range(0, 3));
    h.ready = wb ? 1'b1 : 1'($urandom); h.safe = STG_DEC;
    return h;
  endfunction

  // reference: look from youngest (EXE1) to oldest (WRITE-BACK)
  task automatic expect_src(logic used, logic [4:0] r, output fwd_t f, output logic st);
    f = FWD_RF; st = 0;
    if (!used) return;
    if (i1.wr && i1.dst == r) begin f = FWD_EXE1; st = !i1.ready; return; end
    if (i2.wr && i2.dst == r) begin f = FWD_EXE2; st = !i2.ready; return; end
    if (i3.wr && i3.dst == r) begin f = FWD_EXE3; st = !i3.ready; return; end
    if (iw.wr && iw.dst == r) begin f = FWD_WB; return; end
  endtask

  initial begin
    repeat (5000) begin
      fwd_t efa, efb;
      logic sa, sb;
      dec = '0;
      dec.uses_rs = 1'($urandom); dec.uses_rt = 1'($urandom);
      dec.rs = 5'($urandom_range(0, 3)); dec.rt = 5'($urandom_range(0, 3));
      dec_valid = ($urandom_range(0, 5) != 0);
      bus_stall = ($urandom_range(0, 5) == 0);
      i1 = rnd_info(0); i2 = rnd_info(0); i3 = rnd_info(0); iw = rnd_info(1);
      #1;
      expect_src(dec.uses_rs, dec.rs, efa, sa);
      expect_src(dec.uses_rt, dec.rt, efb, sb);
      checks++;
      if (fa !== efa || fb !== efb || hz !== (dec_valid && (sa || sb)) || adv !== !bus_stall) begin
        failures++;
        $display("FAIL fa=%s/%s fb=%s/%s hz=%b adv=%b", fa.name(), efa.name(), fb.name(), efb.name(), hz, adv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
