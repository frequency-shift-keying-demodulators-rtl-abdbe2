// tb_pfd_preproc_demod: PFD with preprocessor on a 1-bit subsampled input.
// The stimulus imitates the sampler output: the tone is sampled at 75 kHz
// (instants rounded to the 20 MHz grid) and held, so a 35 kHz tone arrives
// as a mix of 533- and 800-clock periods and a 15 kHz tone as 1333-clock
// periods. Checks: the filtered period stays within 520..650 (35 kHz) or
// 1300..1370 (15 kHz) clocks and varies less than the raw input period; the
// regenerated wave has the filtered period; bit_out is 1 for 35 kHz and 0 for
// 15 kHz once the averaging window has refilled.
`timescale 1ns/1ps
module tb_pfd_preproc_demod;
  logic clk = 0, rst_n = 0, sig_in = 0;
  logic [15:0] period_f;
  logic regen, up, down, bit_out;
  logic signed [10:0] up_down;
  int checks = 0, failures = 0;
  real f_gen = 35_000.0;
  int cyc = 0;

  pfd_preproc_demod dut (.*);
  always #25 clk = ~clk;

  // 1-bit subsampled tone: sample k taken at clock round(k*800/3)
  longint k_smp = 0;
  real ph = 0.0;
  always @(negedge clk) begin
    cyc++;
    if (cyc >= (k_smp * 800 + 1) / 3) begin
      ph += f_gen / 75_000.0;
      if (ph >= 1.0) ph -= 1.0;
      sig_in = (ph < 0.5);
      k_smp++;
    end
  end

  initial begin
    #40_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // raw input period spread, filtered period spread, regen period
  int last_in = 0, last_rg = 0, raw_min, raw_max, f_min, f_max;
  bit in_q = 0, rg_q = 0, measuring = 0;
  logic [15:0] pf_at_rise;
  always @(posedge clk) begin
    #1;
    if (measuring) begin
      if (sig_in && !in_q) begin
        if (cyc - last_in < raw_min) raw_min = cyc - last_in;
        if (cyc - last_in > raw_max) raw_max = cyc - last_in;
        last_in = cyc;
      end
      if (period_f < f_min) f_min = period_f;
      if (period_f > f_max) f_max = period_f;
      if (regen && !rg_q) begin
        // a regenerated period is period_f rounded down to even, give or
        // take one setting change inside the period
        if (last_rg > 0) begin
          checks++;
          if ((cyc - last_rg) < f_min - 2 || (cyc - last_rg) > f_max + 2) begin
            failures++; $display("regen period %0d outside %0d..%0d", cyc - last_rg, f_min, f_max);
          end
        end
        last_rg = cyc;
      end
    end else begin
      last_in = cyc; last_rg = 0;
    end
    in_q = sig_in; rg_q = regen;
  end

  task automatic phase_check(input real f, input int lo, input int hi, input bit b);
    f_gen = f;
    measuring = 0;
    repeat (8000) @(posedge clk);      // preprocessor and averages settle
    raw_min = 1 << 30; raw_max = 0; f_min = 1 << 30; f_max = 0;
    measuring = 1;
    for (int k = 0; k < 200; k++) begin
      repeat (50) @(posedge clk); #2;
      checks++;
      if (bit_out !== b) begin failures++; if (failures < 8) $display("f=%0.0f bit=%b up_down=%0d", f, bit_out, up_down); end
    end
    measuring = 0;
    checks++;
    if (f_min < lo || f_max > hi) begin failures++; $display("f=%0.0f filtered period %0d..%0d", f, f_min, f_max); end
    checks++;
    if (b && (f_max - f_min) >= (raw_max - raw_min)) begin
      failures++; $display("no smoothing: raw %0d..%0d filtered %0d..%0d", raw_min, raw_max, f_min, f_max);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) begin
      phase_check(35_000.0, 520, 650, 1);
      phase_check(15_000.0, 1300, 1370, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
