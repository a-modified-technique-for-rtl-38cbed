// ca1 -- address circuit CA1: programmable logic array for the states whose
// next address depends on more than one logical condition.
//
// Purely combinational. Each product term of the AND plane compares the
// present address K(am) with the code of one state and tests a cube of the
// conditions x1..x6 ('*' = don't care); the OR plane ORs the next-address
// codes K(as) of all matching terms. The eleven terms are those of the
// example algorithm G1 for states a2 (0110), a7 (0010) and a8 (1001):
//   a2: x1 x2 -> a3, x1 !x2 !x3 -> a4, x1 !x2 x3 -> a5, !x1 x4 -> a5, !x1 !x4 -> a6
//   a7, a8: x5 -> a10, !x5 x6 -> a10, !x5 !x6 -> a11
// The terms of one state are disjoint, so at most one term is active.
// `hit` is 1 when some term matches; it is this design's addition, used only
// for checking. For an address whose microinstruction has FF = 0 no term
// matches and the output is 0000, which the automaton then ignores.
//
// Interface: x[6:1] = x1..x6, am = present address, as_o = next address.
module ca1
  import mpa_pkg::*;
(
  input  logic [6:1] x,
  input  addr_t      am,
  output addr_t      as_o,
  output logic       hit
);

  localparam int unsigned IN_W = 6 + ADDR_W;  // {x1..x6, K(am)}
  localparam int unsigned N_T  = 11;          // product terms

  typedef struct packed {
    logic [IN_W-1:0] care;   // 1 = input takes part in the term
    logic [IN_W-1:0] value;  // required value where care = 1
    addr_t           out;    // K(as) driven when the term is true
  } term_t;

  // Build a term from the x cube written x1..x6 as a string of '0','1','*'.
  function automatic term_t mk(string cube, addr_t am_code, addr_t as_code);
    term_t t;
    t.care  = '0;
    t.value = '0;
    for (int i = 0; i < 6; i++) begin
      // input bit IN_W-1-i carries x_(i+1)
      if (cube[i] != "*") begin
        t.care [IN_W-1-i] = 1'b1;
        t.value[IN_W-1-i] = (cube[i] == "1");
      end
    end
    t.care [ADDR_W-1:0] = '1;
    t.value[ADDR_W-1:0] = am_code;
    t.out = as_code;
    return t;
  endfunction

  // Personality of the array: the direct PLA table of CA1.
  localparam term_t PLA [N_T] = '{
    // T(a2)
    mk("11****", 4'b0110, 4'b0001),
    mk("100***", 4'b0110, 4'b0111),
    mk("101***", 4'b0110, 4'b1000),
    mk("0**1**", 4'b0110, 4'b1000),
    mk("0**0**", 4'b0110, 4'b0101),
    // T(a7)
    mk("****1*", 4'b0010, 4'b0011),
    mk("****01", 4'b0010, 4'b0011),
    mk("****00", 4'b0010, 4'b1010),
    // T(a8)
    mk("****1*", 4'b1001, 4'b0011),
    mk("****01", 4'b1001, 4'b0011),
    mk("****00", 4'b1001, 4'b1010)
  };

  logic [IN_W-1:0] in;
  assign in = {x[1], x[2], x[3], x[4], x[5], x[6], am};

  always_comb begin
    as_o = '0;
    hit  = 1'b0;
    for (int t = 0; t < N_T; t++) begin
      if (((in ^ PLA[t].value) & PLA[t].care) == '0) begin
        as_o = as_o | PLA[t].out;
        hit  = 1'b1;
      end
    end
  end

endmodule
