// tb_m1_mux -- exhaustive check of multiplexer M1: CA1 address when
// phi3 = 1, FFA when phi3 = 0.
module tb_m1_mux;
  import mpa_pkg::*;

  int checks = 0, failures = 0;
  logic phi3;
  addr_t ca1_addr, ffa, addr_o;

  m1_mux dut (.phi3(phi3), .ca1_addr(ca1_addr), .ffa(ffa), .addr_o(addr_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      phi3     = v[8];
      ca1_addr = v[7:4];
      ffa      = v[3:0];
      #1;
      checks++;
      if (addr_o !== (v[8] ? v[7:4] : v[3:0])) begin
        failures++;
        $display("FAIL phi3=%b ca1=%b ffa=%b got %b", phi3, ca1_addr, ffa, addr_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
