// flow_control: Flow Control Entity of the Core Control Unit.
//
// Keeps data moving through the pipeline. For each source register the
// instruction in DECODE reads, it looks for the youngest older instruction in
// EXE1, EXE2, EXE3 or WRITE-BACK that writes that register:
//   * if that instruction's result already exists (ALU results exist from EXE1
//     on, loads and multiplications only in WRITE-BACK), the operand is
//     forwarded from that stage;
//   * otherwise the operand cannot be forwarded and FETCH and DECODE stall for a
//     cycle while a bubble enters EXE1.
// An external bus or cache stall freezes every stage (`advance` low). The
// register-level priority and the exact points where results become
// forwardable are this design's choices. Combinational.
module flow_control
  import coffee_pkg::*;
(
  input  logic       dec_valid,
  input  dec1_ctrl_t dec,
  input  hz_info_t   info_exe1,
  input  hz_info_t   info_exe2,
  input  hz_info_t   info_exe3,
  input  hz_info_t   info_wb,
  input  logic       bus_stall,
  output fwd_t       fwd_a,
  output fwd_t       fwd_b,
  output logic       hazard_stall,
  output logic       advance
);
  logic stall_a, stall_b;

  // Resolve one operand: returns the forwarding source, sets `stall` when the
  // value is not available yet.
  function automatic fwd_t resolve(input logic used, input logic [4:0] src,
                                   input hz_info_t e1, input hz_info_t e2,
                                   input hz_info_t e3, input hz_info_t wb,
                                   output logic stall);
    stall = 1'b0;
    if (!used) return FWD_RF;
    if (e1.wr && e1.dst == src) begin stall = !e1.ready; return FWD_EXE1; end
    if (e2.wr && e2.dst == src) begin stall = !e2.ready; return FWD_EXE2; end
    if (e3.wr && e3.dst == src) begin stall = !e3.ready; return FWD_EXE3; end
    if (wb.wr && wb.dst == src) return FWD_WB;
    return FWD_RF;
  endfunction

  always_comb begin
    fwd_a = resolve(dec.uses_rs, dec.rs, info_exe1, info_exe2, info_exe3, info_wb, stall_a);
    fwd_b = resolve(dec.uses_rt, dec.rt, info_exe1, info_exe2, info_exe3, info_wb, stall_b);
    hazard_stall = dec_valid && (stall_a || stall_b);
    advance      = !bus_stall;
  end
endmodule
