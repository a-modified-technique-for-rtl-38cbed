// tb_ca1 -- exhaustive check of the CA1 PLA. For each of the three
// multi-branch states (a2 at 0110, a7 at 0010, a8 at 1001) and all 64
// values of x1..x6 the expected next address is computed from the decision
// tree of algorithm G1; for every other address no term may match and the
// output must be 0000.
module tb_ca1;
  import mpa_pkg::*;

  int checks = 0, failures = 0;
  logic [6:1] x;
  addr_t am, as_o;
  logic hit;

  ca1 dut (.x(x), .am(am), .as_o(as_o), .hit(hit));

  // State codes.
  localparam addr_t A3 = 4'b0001, A4 = 4'b0111, A5 = 4'b1000, A6 = 4'b0101;
  localparam addr_t A10 = 4'b0011, A11 = 4'b1010;

  function automatic addr_t ref_next(addr_t a, logic [6:1] c);
    case (a)
      4'b0110: begin  // a2
        if (c[1]) return c[2] ? A3 : (c[3] ? A5 : A4);
        else      return c[4] ? A5 : A6;
      end
      4'b0010, 4'b1001: return (c[5] || c[6]) ? A10 : A11;  // a7, a8
      default: return '0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int v = 0; v < 64; v++) begin
        logic want_hit;
        am = addr_t'(a);
        x  = 6'(v);
        #1;
        want_hit = (a == 6) || (a == 2) || (a == 9);
        checks++;
        if (hit !== want_hit || as_o !== ref_next(am, x)) begin
          failures++;
          $display("FAIL am=%b x6..x1=%b got %b hit=%b want %b hit=%b",
                   am, x, as_o, hit, ref_next(am, x), want_hit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
