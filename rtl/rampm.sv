// rampm -- Register Address MicroProgram Memory: the microprogram counter.
//
// A clocked ADDR_W-bit register. Priority of its controls on a rising clock:
//   phi0           load START_ADDR (first address of the microprogram)
//   en & phi1      address + 1
//   en & phi2      load `load_addr` (FFA through M1)
//   en & phi3      load `load_addr` (CA1 through M1)
//   otherwise      hold
// One of phi1, phi2, phi3 is expected in every enabled cycle; an assertion
// checks that exactly one is present. Asynchronous active-low reset to
// START_ADDR.
//
// The three ways of forming the next address (first address, +1, load)
// follow the published method. The enable, the reset and the priority of phi0 are
// this design's choices.
module rampm
  import mpa_pkg::*;
#(
  parameter addr_t START_ADDR = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  phi0,
  input  logic  phi1,
  input  logic  phi2,
  input  logic  phi3,
  input  addr_t load_addr,
  output addr_t addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  addr <= START_ADDR;
    else if (phi0)               addr <= START_ADDR;
    else if (en && phi1)         addr <= addr + 1'b1;
    else if (en && (phi2 || phi3)) addr <= load_addr;
  end

  // Exactly one next-address source per executed microinstruction.
  a_one_source : assert property (@(posedge clk) disable iff (!rst_n)
    (en && !phi0) |-> (int'(phi1) + int'(phi2) + int'(phi3) == 1));

endmodule
