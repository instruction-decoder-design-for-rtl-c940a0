// register_file: the general purpose register bank.
//
// NREG registers of XLEN bits with two asynchronous read ports, used by the
// DECODE stage, and one synchronous write port, driven by WRITE-BACK. Every
// register is cleared by reset, so programs start from all-zero registers.
// Register 0 is an ordinary register here, as in the original core; the option of
// keeping it at zero is handled in the decoder (the write is suppressed there).
// Reads return the stored value; a value written in the same cycle reaches the
// DECODE stage through the forwarding path instead.
module register_file
  import coffee_pkg::*;
#(
  parameter int NREGS = NREG
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(NREGS)-1:0]  raddr_a,
  output logic [XLEN-1:0]           rdata_a,
  input  logic [$clog2(NREGS)-1:0]  raddr_b,
  output logic [XLEN-1:0]           rdata_b,
  input  logic                      we,
  input  logic [$clog2(NREGS)-1:0]  waddr,
  input  logic [XLEN-1:0]           wdata
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];
endmodule
