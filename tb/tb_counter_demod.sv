// tb_counter_demod: ideal 35 kHz and 15 kHz square waves at 20 MHz.
// With a 1 MHz counting tick and four periods summed, N_count must settle to
// 114 (35 kHz) or 266 (15 kHz), minus up to one tick per period for the
// unsynchronised start of each count, i.e. 110..114 and 262..267. bit_out must
// be 1 for 35 kHz and 0 for 15 kHz, and N_count must be refreshed once per
// input period, three clocks after the input rises.
`timescale 1ns/1ps
module tb_counter_demod;
  logic clk = 0, rst_n = 0, sig_in = 0;
  logic [11:0] n_count;
  logic bit_out;
  int checks = 0, failures = 0;
  localparam int LAT = 3;   // input edge to N_count update, in clocks
  int rise_cyc = -100, cyc = 0, updates = 0;
  logic [11:0] n_prev = 0;

  counter_demod dut (.*);
  always #25 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // n_count may only change LAT clocks after the input rose
  always @(posedge clk) begin
    #1;
    if (rst_n && n_count != n_prev) begin
      updates++;
      checks++;
      if (cyc - rise_cyc != LAT) begin
        failures++;
        $display("n_count changed %0d clocks after the edge", cyc - rise_cyc);
      end
    end
    n_prev = n_count;
  end

  // tone generator: a phase accumulator advanced every clock gives an exact
  // average frequency with edges on the clock grid
  real f_gen = 35_000.0, phase = 0.0;
  always @(negedge clk) begin
    phase += f_gen * 50.0e-9;
    if (phase >= 1.0) phase -= 1.0;
    if (!sig_in && phase < 0.5) rise_cyc = cyc;
    sig_in = (phase < 0.5);
  end

  // wait for n rising edges of a tone of frequency f
  task automatic tone(input real f_hz, input int n_periods);
    f_gen = f_hz;
    repeat (n_periods) @(posedge sig_in);
  endtask

  task automatic expect_range(input int lo, input int hi, input bit b);
    checks++;
    if (n_count < lo || n_count > hi || bit_out !== b) begin
      failures++;
      $display("n_count=%0d bit=%b, expected %0d..%0d bit %b", n_count, bit_out, lo, hi, b);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      tone(35_000.0, 6);
      for (int k = 0; k < 6; k++) begin tone(35_000.0, 1); repeat (3) @(posedge clk); expect_range(108, 118, 1); end
      tone(15_000.0, 4);
      for (int k = 0; k < 6; k++) begin tone(15_000.0, 1); repeat (3) @(posedge clk); expect_range(258, 270, 0); end
    end
    checks++;
    if (updates < 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
