// m1_mux -- multiplexer M1 in front of the address register.
//
// Chooses which address the register loads when it does not increment:
// the next address formed by CA1 when phi3 (the FF flag) is 1, otherwise the
// false address field FFA of the current microinstruction. Combinational.
// The two sources and the select follow the published method; the 2-to-1 form is the
// simplest circuit with that function.
module m1_mux
  import mpa_pkg::*;
(
  input  logic  phi3,
  input  addr_t ca1_addr,
  input  addr_t ffa,
  output addr_t addr_o
);

  always_comb addr_o = phi3 ? ca1_addr : ffa;

endmodule
