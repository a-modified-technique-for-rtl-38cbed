// tb_ca2 -- exhaustive check of CA2 over FLC, x7, x3 and phi3. With
// phi3 = 1 neither phi1 nor phi2 may be active; otherwise the condition
// named by FLC (00: none, 01: x7, 10: x3, 11: none) gives phi1 when it is 1
// and phi2 when it is 0.
module tb_ca2;
  import mpa_pkg::*;

  int checks = 0, failures = 0;
  flc_e flc;
  logic x7, x3, phi3, phi1, phi2;

  ca2 dut (.flc(flc), .x7(x7), .x3(x3), .phi3(phi3), .phi1(phi1), .phi2(phi2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic cond, w1, w2;
      flc  = flc_e'(v[1:0]);
      x7   = v[2];
      x3   = v[3];
      phi3 = v[4];
      #1;
      cond = (v[1:0] == 2'b01) ? v[2] : (v[1:0] == 2'b10) ? v[3] : 1'b0;
      w1 = !phi3 && cond;
      w2 = !phi3 && !cond;
      checks++;
      if (phi1 !== w1 || phi2 !== w2) begin
        failures++;
        $display("FAIL flc=%b x7=%b x3=%b phi3=%b got phi1=%b phi2=%b", flc, x7, x3, phi3, phi1, phi2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
