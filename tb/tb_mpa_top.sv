// tb_mpa_top -- end-to-end test of the automaton running algorithm G1.
//
// A reference model walks the flowchart of G1 state by state (a1 .. a11),
// written from the decision tree, not from the microprogram: for each state
// it gives the micro-operations, the stop flag and the successor for the
// current conditions x1..x7. The testbench starts the automaton, drives
// random conditions on every falling edge, and in every busy cycle checks
// Y, Z and the address (the state code) against the model. It also checks
// that a run of k flowchart states takes exactly k clock cycles (one
// microinstruction per state, no extra unconditional-jump words), that busy
// falls after the stop state, and that the automaton idles at address 0000
// without issuing operations until the next start.
//
// Mechanisms counted (each must occur): start (phi0), CA1 branch (phi3),
// CA2 increment (phi1), CA2 conditional jump to FFA (phi2 with a tested
// condition), unconditional jump (phi2 with FLC = 00), stop (Z), the a3
// self-loop, idle hold; and every one of the 11 states and 20 transitions.
module tb_mpa_top;
  import mpa_pkg::*;

  localparam int RUNS = 400;

  typedef enum int {A1 = 1, A2, A3, A4, A5, A6, A7, A8, A9, A10, A11} st_e;

  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [7:1] x = '0;
  yvec_t      y;
  logic       z, busy;
  addr_t      addr;
  logic [3:1] phi;

  mpa_top dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y), .z(z),
               .busy(busy), .addr(addr), .phi(phi));

  always #5 clk = ~clk;

  // ---- reference model of G1 ----
  function automatic addr_t code(st_e s);
    case (s)
      A1: return 4'b0000;  A3: return 4'b0001;  A7: return 4'b0010;
      A10: return 4'b0011; A9: return 4'b0100;  A6: return 4'b0101;
      A2: return 4'b0110;  A4: return 4'b0111;  A5: return 4'b1000;
      A8: return 4'b1001;  A11: return 4'b1010;
      default: return 4'b1111;
    endcase
  endfunction

  function automatic yvec_t ops_of(st_e s);
    yvec_t v = '0;
    case (s)
      A2:  begin v[1] = 1; v[2] = 1; end
      A3:  begin v[3] = 1; v[4] = 1; end
      A4:  begin v[2] = 1; v[3] = 1; end
      A5:  begin v[1] = 1; v[4] = 1; end
      A6:  begin v[1] = 1; v[5] = 1; end
      A7:  begin v[1] = 1; v[5] = 1; end
      A8:  begin v[3] = 1; v[6] = 1; end
      A9:  begin v[2] = 1; v[3] = 1; end
      A10: begin v[1] = 1; v[2] = 1; end
      A11: begin v[2] = 1; end
      default: ;
    endcase
    return v;
  endfunction

  function automatic logic stop_of(st_e s);
    return (s == A10) || (s == A11);
  endfunction

  // Successor state and the index (0..19) of the transition taken.
  function automatic st_e next_of(st_e s, logic [7:1] c, output int tr);
    case (s)
      A1: begin tr = 0; return A2; end
      A2: begin
        if (c[1]) begin
          if (c[2])      begin tr = 1; return A3; end
          else if (c[3]) begin tr = 2; return A5; end
          else           begin tr = 3; return A4; end
        end else begin
          if (c[4]) begin tr = 4; return A5; end
          else      begin tr = 5; return A6; end
        end
      end
      A3: if (c[7]) begin tr = 6; return A7; end else begin tr = 7; return A3; end
      A4: begin tr = 8; return A8; end
      A5: begin tr = 9; return A8; end
      A6: begin tr = 10; return A9; end
      A9: if (c[3]) begin tr = 11; return A6; end else begin tr = 12; return A8; end
      A7: if (c[5]) begin tr = 13; return A10; end
          else if (c[6]) begin tr = 14; return A10; end
          else begin tr = 15; return A11; end
      A8: if (c[5]) begin tr = 16; return A10; end
          else if (c[6]) begin tr = 17; return A10; end
          else begin tr = 18; return A11; end
      default: begin tr = 19; return A1; end  // A10, A11 -> A1
    endcase
  endfunction

  // ---- coverage counters ----
  int n_start = 0, n_ca1 = 0, n_inc = 0, n_cjump = 0, n_unt = 0, n_stop = 0;
  int n_loop = 0, n_idle = 0;
  int st_seen [12];
  int tr_seen [20];

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (RUNS * 200 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (st_seen[i]) st_seen[i] = 0;
    foreach (tr_seen[i]) tr_seen[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < RUNS; run++) begin
      st_e s;
      int  len, cyc, tr;
      logic [7:1] c;
      // idle for a few cycles: no operations, address parked at 0000
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        x = 7'($urandom);
        #1;
        checks++;
        if (busy || z || y != '0 || addr != 4'b0000)
          fail($sformatf("run %0d idle: busy=%b z=%b y=%b addr=%b", run, busy, z, y, addr));
        n_idle++;
        @(posedge clk);
      end
      // start pulse (phi0)
      @(negedge clk);
      start = 1'b1;
      n_start++;
      @(posedge clk);
      @(negedge clk);
      start = 1'b0;
      // follow the flowchart
      s   = A1;
      len = 0;
      cyc = 0;
      forever begin
        c = 7'($urandom);
        x = c;
        #1;
        len++;
        st_seen[s]++;
        checks++;
        if (!busy) fail($sformatf("run %0d: not busy in state a%0d", run, int'(s)));
        if (busy) cyc++;
        checks++;
        if (addr != code(s) || y != ops_of(s) || z != stop_of(s))
          fail($sformatf("run %0d state a%0d: addr=%b y=%b z=%b want addr=%b y=%b z=%b",
                         run, int'(s), addr, y, z, code(s), ops_of(s), stop_of(s)));
        // mechanism accounting from the automaton's own control signals
        if (phi[3]) n_ca1++;
        if (phi[1]) n_inc++;
        if (phi[2] && dut.mi.flc != FLC_UNT) n_cjump++;
        if (phi[2] && dut.mi.flc == FLC_UNT) n_unt++;
        if (z) n_stop++;
        s = next_of(s, c, tr);
        tr_seen[tr]++;
        if (tr == 7) n_loop++;
        @(posedge clk);
        if (tr == 19) break;
        @(negedge clk);
        if (len > 150) begin fail("run did not end"); break; end
      end
      // after the stop state: busy must fall, address back at 0000
      #1;
      checks++;
      if (busy || addr != 4'b0000) fail($sformatf("run %0d: after stop busy=%b addr=%b", run, busy, addr));
      // latency: one clock per flowchart state
      checks++;
      if (cyc != len) fail($sformatf("run %0d: %0d busy cycles for %0d states", run, cyc, len));
    end
    $display("mechanisms: start=%0d ca1_branch=%0d ca2_increment=%0d ca2_cond_jump=%0d unconditional=%0d stop=%0d a3_loop=%0d idle=%0d",
             n_start, n_ca1, n_inc, n_cjump, n_unt, n_stop, n_loop, n_idle);
    checks++;
    if (n_start == 0 || n_ca1 == 0 || n_inc == 0 || n_cjump == 0 || n_unt == 0 ||
        n_stop == 0 || n_loop == 0 || n_idle == 0) fail("a mechanism never happened");
    for (int i = 1; i <= 11; i++) begin
      checks++;
      if (st_seen[i] == 0) fail($sformatf("state a%0d never visited", i));
    end
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (tr_seen[i] == 0) fail($sformatf("transition %0d never taken", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
