// mpa_pkg -- shared types and constants of the micro-programmed automaton
// with combined addressing and a split address circuit (CA1 / CA2).
//
// A microinstruction has four fields, most significant first:
//   FF  (1 bit)  flag: 1 = next address comes from the PLA address circuit CA1,
//                0 = next address comes from CA2 (increment or jump to FFA)
//   FMO (7 bits) micro-operation field: stop signal Z and micro-operations y1..y6
//   FLC (2 bits) logical-condition code tested by CA2
//   FFA (4 bits) false address, loaded when the tested condition is 0
// giving a 14-bit word for the example algorithm of this design (eleven
// states, so a 4-bit address). The field widths and the FLC codes
// (00 unconditional, 01 x7, 10 x3) are those of the example; the bit order of
// y1..y6 inside the struct is this design's choice.
package mpa_pkg;

  // Widths of the example microprogram.
  localparam int unsigned ADDR_W = 4;  // R: address / FFA width
  localparam int unsigned FLC_W  = 2;  // FLC width
  localparam int unsigned N_Y    = 6;  // micro-operations y1..y6
  localparam int unsigned N_X    = 7;  // logical conditions x1..x7
  localparam int unsigned MI_W   = 1 + 1 + N_Y + FLC_W + ADDR_W;  // 14

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [N_Y:1]      yvec_t;   // yvec_t[i] is micro-operation y_i

  // Codes of the FLC field; the fourth code selects a constant 0 as well.
  typedef enum logic [FLC_W-1:0] {
    FLC_UNT = 2'b00,  // unconditional transition: always jump to FFA
    FLC_X7  = 2'b01,  // test x7
    FLC_X3  = 2'b10,  // test x3
    FLC_NC  = 2'b11   // not used by the microprogram, behaves as FLC_UNT
  } flc_e;

  typedef struct packed {
    logic  z;  // stop signal Z
    yvec_t y;  // micro-operations y1..y6
  } fmo_t;

  typedef struct packed {
    logic  ff;   // flag field: 1 selects CA1
    fmo_t  fmo;
    flc_e  flc;
    addr_t ffa;
  } mi_t;

  // Micro-operation vector with y_a and y_b set (0 leaves that slot empty).
  function automatic yvec_t ops(int unsigned a, int unsigned b);
    yvec_t v = '0;
    if (a != 0) v[a] = 1'b1;
    if (b != 0) v[b] = 1'b1;
    return v;
  endfunction

endpackage
