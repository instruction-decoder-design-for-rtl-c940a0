// address_checker: validates load/store data addresses in EXE2.
//
// When the control unit asks for a check (a load or store is in EXE2), the
// address must be word aligned and lie inside [ADDR_LO, ADDR_HI]; otherwise
// `err` is raised and the master control turns it into an address exception
// before the access reaches the memory stage. Alignment and the range test are
// this design's choice of what "validating" an address means. Combinational.
// With the default full range both bound comparisons are constant, and lint
// says so; synthesis then removes them and only the alignment test remains.
module address_checker
  import coffee_pkg::*;
#(
  parameter logic [XLEN-1:0] ADDR_LO = '0,
  parameter logic [XLEN-1:0] ADDR_HI = '1
) (
  input  logic            check,
  input  logic [XLEN-1:0] addr,
  output logic            err
);
  always_comb begin
    err = check && ((addr[1:0] != 2'b00) || (addr < ADDR_LO) || (addr > ADDR_HI));
  end
endmodule
