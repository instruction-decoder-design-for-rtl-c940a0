// master_control: Master Control Entity of the Core Control Unit.
//
// Takes exceptions and interrupts and overrides everything else: it can load a
// new PC and flush any stage. Sources, oldest instruction first:
//   EXE2   address error from the address checker (load/store)   EXC_ADDR
//   EXE1   signed overflow of ADD, ADDI or SUB                     EXC_OVERFLOW
//   DECODE instruction outside the implemented MIPS subset         EXC_ILLEGAL
//   int_req, taken on the instruction in DECODE                    EXC_INT
// The excepting instruction and all younger ones are flushed and fetching
// restarts at EXC_VECTOR (INT_VECTOR for interrupts). An interrupt is taken only
// when the older instructions in EXE1 and EXE2 can no longer raise an exception
// (they are past their safe state), so every exception stays precise; the
// interrupted DECODE instruction's PC is reported as the return address.
// Each event writes cause and PC to the core configuration block (ccb_we for
// one cycle). Vectors, priority and the cause codes are this design's choices.
// Nothing is taken while the pipeline is frozen. Combinational.
module master_control
  import coffee_pkg::*;
#(
  parameter logic [XLEN-1:0] EXC_VECTOR = 32'h0000_0100,
  parameter logic [XLEN-1:0] INT_VECTOR = 32'h0000_0200
) (
  input  logic            advance,
  input  logic            dec_valid,
  input  logic            dec_illegal,
  input  logic [XLEN-1:0] dec_pc,
  input  logic            exe1_valid,
  input  stage_t          exe1_safe,
  input  logic            exe1_ovf,
  input  logic [XLEN-1:0] exe1_pc,
  input  logic            exe2_valid,
  input  stage_t          exe2_safe,
  input  logic            exe2_addr_err,
  input  logic [XLEN-1:0] exe2_pc,
  input  logic            int_req,
  output logic            kill_dec,
  output logic            kill_exe1,
  output logic            kill_exe2,
  output logic            pc_load,
  output logic [XLEN-1:0] pc_new,
  output logic            int_ack,
  output logic            ccb_we,
  output exc_cause_t      exc_cause,
  output logic [XLEN-1:0] exc_pc
);
  logic int_ok;

  always_comb begin
    kill_dec  = 1'b0;
    kill_exe1 = 1'b0;
    kill_exe2 = 1'b0;
    pc_load   = 1'b0;
    pc_new    = EXC_VECTOR;
    int_ack   = 1'b0;
    exc_cause = EXC_NONE;
    exc_pc    = '0;
    int_ok    = dec_valid && (!exe1_valid || exe1_safe <= STG_EXE1)
                          && (!exe2_valid || exe2_safe <= STG_EXE2);

    if (advance) begin
      if (exe2_valid && exe2_addr_err) begin
        exc_cause = EXC_ADDR;     exc_pc = exe2_pc;
        kill_exe2 = 1'b1; kill_exe1 = 1'b1; kill_dec = 1'b1;
      end else if (exe1_valid && exe1_ovf) begin
        exc_cause = EXC_OVERFLOW; exc_pc = exe1_pc;
        kill_exe1 = 1'b1; kill_dec = 1'b1;
      end else if (dec_valid && dec_illegal) begin
        exc_cause = EXC_ILLEGAL;  exc_pc = dec_pc;
        kill_dec  = 1'b1;
      end else if (int_req && int_ok) begin
        exc_cause = EXC_INT;      exc_pc = dec_pc;
        kill_dec  = 1'b1;
        int_ack   = 1'b1;
        pc_new    = INT_VECTOR;
      end
    end
    ccb_we  = (exc_cause != EXC_NONE);
    pc_load = ccb_we;
  end
endmodule
