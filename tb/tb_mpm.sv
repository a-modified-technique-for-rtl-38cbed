// tb_mpm -- checks every word of the microprogram memory against the
// microprogram table of example algorithm G1, written here as bit strings in
// the order FF Z y1 y2 y3 y4 y5 y6 FLC(2) FFA(4), and checks that addresses
// past the last word read as an unconditional jump to 0000 with no
// operations. Combinational block: one check per field per address.
module tb_mpm;
  import mpa_pkg::*;

  int checks = 0, failures = 0;
  addr_t addr;
  mi_t   mi;

  mpm dut (.addr(addr), .mi(mi));

  // Expected words, address 0000 .. 1010.
  string exp_tab [16] = '{
    "00000000000110",  // a1
    "00001100010001",  // a3
    "10100010000000",  // a7  (FLC/FFA unused)
    "01110000000000",  // a10
    "00011000101001",  // a9
    "00100010000100",  // a6
    "10110000000000",  // a2  (FLC/FFA unused)
    "00011000001001",  // a4
    "00100100001001",  // a5
    "10001001000000",  // a8  (FLC/FFA unused)
    "01010000000000",  // a11
    "00000000000000", "00000000000000", "00000000000000",
    "00000000000000", "00000000000000"
  };

  function automatic logic bitat(string s, int i);
    return s[i] == "1";
  endfunction

  task automatic chk(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL addr=%b %s got=%0d want=%0d", addr, what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      string s;
      int flc_w, ffa_w;
      addr = addr_t'(a);
      #1;
      s = exp_tab[a];
      chk("FF", int'(mi.ff), int'(bitat(s, 0)));
      chk("Z",  int'(mi.fmo.z), int'(bitat(s, 1)));
      for (int k = 1; k <= 6; k++) chk($sformatf("y%0d", k), int'(mi.fmo.y[k]), int'(bitat(s, 1 + k)));
      flc_w = 2 * int'(bitat(s, 8)) + int'(bitat(s, 9));
      ffa_w = 8 * int'(bitat(s, 10)) + 4 * int'(bitat(s, 11)) + 2 * int'(bitat(s, 12)) + int'(bitat(s, 13));
      if (!bitat(s, 0)) begin  // FLC/FFA only matter when CA2 is used
        chk("FLC", int'(mi.flc), flc_w);
        chk("FFA", int'(mi.ffa), ffa_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
