// tb_csc -- checks the control signals circuit: idle after reset with Y and
// Z forced to 0; busy from the edge after `start`; Y and Z equal to the FMO
// field while busy; busy falls on the edge after a word with Z = 1 and then
// Y and Z are 0 again. Random FMO words with Z rarely set drive several runs;
// run lengths (start to fall of busy) are checked against a reference model.
module tb_csc;
  import mpa_pkg::*;

  int checks = 0, failures = 0, runs = 0, stops = 0;
  logic  clk = 0, rst_n = 0, start = 0;
  fmo_t  fmo = '0;
  yvec_t y;
  logic  z, busy, model_busy;

  csc dut (.clk(clk), .rst_n(rst_n), .start(start), .fmo(fmo), .y(y), .z(z), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_busy = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      fmo.y = yvec_t'($urandom);
      fmo.z = ($urandom_range(0, 7) == 0);
      start = !model_busy && ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (busy !== model_busy ||
          y !== (model_busy ? fmo.y : '0) ||
          z !== (model_busy && fmo.z)) begin
        failures++;
        $display("FAIL cycle %0d: busy=%b y=%b z=%b model_busy=%b fmo=%b", i, busy, y, z, model_busy, fmo);
      end
      if (start) begin model_busy = 1'b1; runs++; end
      else if (model_busy && fmo.z) begin model_busy = 1'b0; stops++; end
      @(posedge clk);
    end
    $display("runs=%0d stops=%0d", runs, stops);
    checks++;
    if (runs < 10 || stops < 10) begin
      failures++;
      $display("FAIL too few runs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
