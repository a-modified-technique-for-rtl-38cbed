// mpm -- MicroProgram Memory of the modified automaton.
//
// A read-only memory of DEPTH words of type mpa_pkg::mi_t (FF, FMO, FLC, FFA),
// read combinationally: the word at `addr` appears on `mi` in the same cycle,
// so one microinstruction is executed per clock together with the address
// register. The contents are the microprogram of the example algorithm G1:
// eleven states a1..a11 coded so that a run of "condition = 1" successors has
// consecutive addresses (a3 -> a7 -> a10 at 0001, 0010, 0011) and the three
// states with multi-condition branches (a2, a7, a8) carry FF = 1 and leave
// FLC/FFA unused.
//
// Follows the published method: every field value of the eleven words. Own choices:
// the unused FLC/FFA of FF = 1 words are stored as 00/0000, and an address
// beyond the last word reads as an unconditional jump to address 0 with no
// operations, so a stray address returns the machine to its start state.
module mpm
  import mpa_pkg::*;
(
  input  addr_t addr,
  output mi_t   mi
);

  // One word per state: ff, z, ops, flc, ffa.
  function automatic mi_t word(logic ff_v, logic z_v, yvec_t y_v, flc_e flc_v, addr_t ffa_v);
    mi_t w;
    w.ff  = ff_v;
    w.fmo = '{z: z_v, y: y_v};
    w.flc = flc_v;
    w.ffa = ffa_v;
    return w;
  endfunction

  localparam int unsigned DEPTH = 11;  // words of the G1 microprogram

  mi_t rom [DEPTH];

  // The word layout must match the 14-bit format of the example.
  if ($bits(mi_t) != MI_W) begin : g_width_check
    $error("mi_t is %0d bits, expected %0d", $bits(mi_t), MI_W);
  end

  // Table of the G1 microprogram, address order.
  always_comb begin
    for (int i = 0; i < DEPTH; i++) rom[i] = word(1'b0, 1'b0, '0, FLC_UNT, '0);
    rom[0]  = word(1'b0, 1'b0, ops(0, 0), FLC_UNT, 4'b0110); // a1 : go to a2
    rom[1]  = word(1'b0, 1'b0, ops(3, 4), FLC_X7,  4'b0001); // a3 : x7 ? a7 : a3
    rom[2]  = word(1'b1, 1'b0, ops(1, 5), FLC_UNT, 4'b0000); // a7 : CA1
    rom[3]  = word(1'b0, 1'b1, ops(1, 2), FLC_UNT, 4'b0000); // a10: stop, go to a1
    rom[4]  = word(1'b0, 1'b0, ops(2, 3), FLC_X3,  4'b1001); // a9 : x3 ? a6 : a8
    rom[5]  = word(1'b0, 1'b0, ops(1, 5), FLC_UNT, 4'b0100); // a6 : go to a9
    rom[6]  = word(1'b1, 1'b0, ops(1, 2), FLC_UNT, 4'b0000); // a2 : CA1
    rom[7]  = word(1'b0, 1'b0, ops(2, 3), FLC_UNT, 4'b1001); // a4 : go to a8
    rom[8]  = word(1'b0, 1'b0, ops(1, 4), FLC_UNT, 4'b1001); // a5 : go to a8
    rom[9]  = word(1'b1, 1'b0, ops(3, 6), FLC_UNT, 4'b0000); // a8 : CA1
    rom[10] = word(1'b0, 1'b1, ops(2, 0), FLC_UNT, 4'b0000); // a11: stop, go to a1
  end

  always_comb begin
    if (int'(addr) < DEPTH) mi = rom[addr];
    else                    mi = word(1'b0, 1'b0, '0, FLC_UNT, '0);
  end

endmodule
