// mpa_top -- micro-programmed automaton with combined addressing and a split
// address circuit, programmed with the example algorithm G1.
//
// The address register (rampm) addresses the microprogram memory (mpm); the
// word read drives, in the same cycle:
//   * the control signals circuit (csc), which issues Z and y1..y6;
//   * the flag FF as phi3, which chooses the source of the next address;
//   * CA2 (ca2), which tests the condition named by FLC (x7, x3 or constant 0)
//     and asks for an increment (phi1) or a load of FFA (phi2);
//   * CA1 (ca1), a PLA that maps {present address, x1..x6} to the next
//     address of the multi-way branches;
//   * the multiplexer M1 (m1_mux), which passes the CA1 address when phi3 = 1
//     and FFA otherwise to the register's load input.
// One microinstruction, i.e. one state of the algorithm, executes per clock.
// A one-cycle `start` pulse (phi0) loads the first address 0000 and sets
// busy; the states run until one with Z = 1, after which the register holds
// address 0000 again and busy falls. Conditions x1..x7 are sampled on every
// rising edge while busy.
//
// Structure and microprogram follow the published method; the start/busy protocol,
// the reset and the debug outputs `addr` and `phi` are this design's.
module mpa_top
  import mpa_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,     // phi0: start the algorithm
  input  logic [N_X:1] x,       // logical conditions x1..x7
  output yvec_t      y,       // micro-operations y1..y6
  output logic       z,         // stop signal Z (last state of a run)
  output logic       busy,      // automaton is running
  output addr_t      addr,      // current microinstruction address
  output logic [3:1] phi        // phi3, phi2, phi1 of the current cycle
);

  mi_t   mi;
  addr_t ca1_addr;
  addr_t load_addr;
  logic  ca1_hit;
  logic  phi1, phi2, phi3;

  rampm #(.START_ADDR('0)) u_rampm (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (busy),
    .phi0      (start),
    .phi1      (phi1),
    .phi2      (phi2),
    .phi3      (phi3),
    .load_addr (load_addr),
    .addr      (addr)
  );

  mpm u_mpm (
    .addr (addr),
    .mi   (mi)
  );

  assign phi3 = mi.ff;

  ca1 u_ca1 (
    .x    (x[6:1]),
    .am   (addr),
    .as_o (ca1_addr),
    .hit  (ca1_hit)
  );

  ca2 u_ca2 (
    .flc  (mi.flc),
    .x7   (x[7]),
    .x3   (x[3]),
    .phi3 (phi3),
    .phi1 (phi1),
    .phi2 (phi2)
  );

  m1_mux u_m1 (
    .phi3     (phi3),
    .ca1_addr (ca1_addr),
    .ffa      (mi.ffa),
    .addr_o   (load_addr)
  );

  csc u_csc (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .fmo   (mi.fmo),
    .y     (y),
    .z     (z),
    .busy  (busy)
  );

  assign phi = {phi3, phi2, phi1};

  // A microinstruction that hands control to CA1 must hit a PLA term.
  a_ca1_defined : assert property (@(posedge clk) disable iff (!rst_n)
    (busy && phi3) |-> ca1_hit);

endmodule
