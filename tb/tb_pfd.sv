// tb_pfd: the phase-frequency detector against an event-level reference.
// The reference follows the circuit description: a rising edge of in_a sets
// UP, a rising edge of in_b sets DOWN, and the clock after both are high both
// are cleared. Inputs are square waves of independent random frequencies, so
// every ordering of edges occurs. Also checked: with in_a at 35 kHz and in_b at
// 25 kHz, UP pulses dominate and DOWN never lasts more than one clock; with
// 15 kHz against 25 kHz the roles swap.
`timescale 1ns/1ps
module tb_pfd;
  logic clk = 0, rst_n = 0, in_a = 0, in_b = 0;
  logic up, down;
  int checks = 0, failures = 0;
  real fa = 35_000.0, fb = 25_000.0, pa = 0.0, pb = 0.3;
  bit ra = 0, rb = 0;       // reference: inputs as seen one and two clocks ago
  bit a1 = 0, a2 = 0, b1 = 0, b2 = 0, m_up = 0, m_dn = 0;

  pfd dut (.*);
  always #25 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    pa += fa * 50.0e-9; if (pa >= 1.0) pa -= 1.0;
    pb += fb * 50.0e-9; if (pb >= 1.0) pb -= 1.0;
    in_a = (pa < 0.5);
    in_b = (pb < 0.5);
  end

  // reference model, updated on the same clock edges
  always @(posedge clk) if (rst_n) begin
    ra = a1 && !a2;  rb = b1 && !b2;   // edges registered by the previous clock
    if (m_up && m_dn) begin m_up = 0; m_dn = 0; end
    else begin m_up = m_up || ra; m_dn = m_dn || rb; end
    a2 = a1; a1 = in_a; b2 = b1; b1 = in_b;
  end

  task automatic run(input real f_a, input real f_b, input int cycles, output int n_up, output int n_dn, output int max_dn, output int max_up);
    int run_dn = 0, run_up = 0;
    fa = f_a; fb = f_b; n_up = 0; n_dn = 0; max_dn = 0; max_up = 0;
    repeat (cycles) begin
      @(posedge clk); #1;
      checks++;
      if (up !== m_up || down !== m_dn) begin
        failures++;
        if (failures < 5) $display("%t up=%b/%b down=%b/%b", $time, up, m_up, down, m_dn);
      end
      n_up += up; n_dn += down;
      run_dn = down ? run_dn + 1 : 0; run_up = up ? run_up + 1 : 0;
      if (run_dn > max_dn) max_dn = run_dn;
      if (run_up > max_up) max_up = run_up;
    end
  endtask

  initial begin
    int nu, nd, md, mu;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(35_000.0, 25_000.0, 4_000, nu, nd, md, mu);    // settle
    run(35_000.0, 25_000.0, 40_000, nu, nd, md, mu);
    checks++;
    if (!(nu > 10 * nd && md <= 1)) begin failures++; $display("fH: up %0d down %0d max down %0d", nu, nd, md); end
    // longest UP pulse is bounded by one reference period (T_L - T_clk analogue)
    checks++;
    if (mu > 800) begin failures++; $display("UP pulse of %0d clocks", mu); end
    run(15_000.0, 25_000.0, 4_000, nu, nd, md, mu);    // settle
    run(15_000.0, 25_000.0, 40_000, nu, nd, md, mu);
    checks++;
    if (!(nd > 10 * nu && mu <= 1)) begin failures++; $display("fL: up %0d down %0d max up %0d", nu, nd, mu); end
    for (int k = 0; k < 20; k++)
      run(1000.0 + $urandom_range(0, 80_000), 1000.0 + $urandom_range(0, 80_000), 5000, nu, nd, md, mu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
