// csc -- Control Signals Circuit.
//
// Forms the micro-operations y1..y6 and the stop signal Z from the FMO field
// of the current microinstruction, and keeps the automaton's run state:
// `busy` rises on the clock edge after `start` and falls on the clock edge
// after a microinstruction with Z = 1 has been executed. Y and Z are driven
// only while busy, so an idle automaton issues no micro-operations; they are
// combinational from FMO (Moore outputs of the current state).
//
// Forming Y and Z from FMO follows the published method; the busy flag, the gating
// and the reset (idle) are this design's choices, since the published method gives
// the function of this circuit but not its insides.
module csc
  import mpa_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fmo_t  fmo,
  output yvec_t y,
  output logic  z,
  output logic  busy
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            busy <= 1'b0;
    else if (start)        busy <= 1'b1;
    else if (busy && fmo.z) busy <= 1'b0;
  end

  assign y = busy ? fmo.y : '0;
  assign z = busy & fmo.z;

endmodule
