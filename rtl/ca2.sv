// ca2 -- additional address circuit CA2 for transitions that depend on at
// most one logical condition.
//
// A 4-to-1 multiplexer, selected by the FLC field, picks the condition to
// test: input I1 = constant 0 (FLC 00, unconditional transition), I2 = x7
// (FLC 01), I3 = x3 (FLC 10); I4 (FLC 11) is not used by the microprogram and
// is tied to 0 here. The selected value m is then gated by phi3 (the FF flag):
//   phi1 = m & !phi3  -- increment the address register
//   phi2 = !m & !phi3 -- load the false address FFA
// so an unconditional transition always loads FFA, and with phi3 = 1 (CA1
// selected) both outputs are 0. Combinational.
//
// The multiplexer inputs, the FLC codes and the phi1/phi2 meaning follow the published
// method; the value of I4 is this design's choice. The conditions wired to
// I2/I3 are specific to the example algorithm.
module ca2
  import mpa_pkg::*;
(
  input  flc_e flc,
  input  logic x7,
  input  logic x3,
  input  logic phi3,
  output logic phi1,
  output logic phi2
);

  logic [3:0] mux_in;  // I4..I1
  logic       m;

  assign mux_in = {1'b0, x3, x7, 1'b0};
  assign m      = mux_in[flc];
  assign phi1   =  m & ~phi3;
  assign phi2   = ~m & ~phi3;

endmodule
