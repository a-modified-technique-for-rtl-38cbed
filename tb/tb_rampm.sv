// tb_rampm -- random test of the address register against a reference
// model: after reset the address is 0000; phi0 loads 0000 whatever else is
// asked; when enabled, exactly one of phi1 (+1, wrapping from 1111 to 0000),
// phi2 or phi3 (load) acts; when not enabled the address holds. Inputs change
// on the falling edge and the address is compared after every rising edge.
module tb_rampm;
  import mpa_pkg::*;

  int checks = 0, failures = 0;
  int n_inc = 0, n_ld2 = 0, n_ld3 = 0, n_hold = 0, n_start = 0, n_wrap = 0;
  logic clk = 0, rst_n = 0, en = 0, phi0 = 0, phi1 = 0, phi2 = 0, phi3 = 0;
  addr_t load_addr = '0, addr, model;

  rampm dut (.clk(clk), .rst_n(rst_n), .en(en), .phi0(phi0), .phi1(phi1),
             .phi2(phi2), .phi3(phi3), .load_addr(load_addr), .addr(addr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (addr !== 4'b0000) begin failures++; $display("FAIL reset value %b", addr); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int r;
      @(negedge clk);
      r         = $urandom_range(0, 9);
      load_addr = addr_t'($urandom);
      en        = (r != 0);
      phi0      = (r == 1);
      phi1      = (r >= 2 && r <= 5);
      phi2      = (r == 6 || r == 7);
      phi3      = (r >= 8);
      if (!en) {phi1, phi2, phi3} = 3'($urandom);
      // reference update
      if (phi0)                     begin model = '0; n_start++; end
      else if (en && phi1)          begin n_wrap += (model == 4'hF); model = model + 4'd1; n_inc++; end
      else if (en && phi2)          begin model = load_addr; n_ld2++; end
      else if (en && phi3)          begin model = load_addr; n_ld3++; end
      else                          n_hold++;
      @(posedge clk);
      #1;
      checks++;
      if (addr !== model) begin
        failures++;
        $display("FAIL cycle %0d: addr=%b model=%b", i, addr, model);
      end
    end
    $display("increments=%0d ffa_loads=%0d ca1_loads=%0d holds=%0d starts=%0d wraps=%0d",
             n_inc, n_ld2, n_ld3, n_hold, n_start, n_wrap);
    checks++;
    if (n_inc == 0 || n_ld2 == 0 || n_ld3 == 0 || n_hold == 0 || n_start == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a register operation was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
