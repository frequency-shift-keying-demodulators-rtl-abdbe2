// tb_clk_div: the 25 kHz reference divider (DIV = 400) with a random enable.
// Checks that tick comes exactly every 400 enabled cycles, that sq_out toggles
// with each tick, and that with en held high the square wave period is 800
// clocks (25 kHz from 20 MHz).
`timescale 1ns/1ps
module tb_clk_div;
  localparam int DIV = 400;
  logic clk = 0, rst_n = 0, en = 0;
  logic sq_out, tick;
  int checks = 0, failures = 0;

  clk_div #(.DIV(DIV)) dut (.*);
  always #25 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_en = 0, ticks = 0, last_rise = -1, periods = 0;
    bit sq_prev = 0, exp_sq = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // random enable phase
    for (int i = 0; i < 20000; i++) begin
      en = ($urandom_range(0, 1) == 1);
      #1;
      if (en) n_en++;
      checks++;
      if (tick !== (en && (n_en % DIV == 0))) begin
        failures++;
        if (failures < 5) $display("tick mismatch at cycle %0d n_en=%0d", i, n_en);
      end
      if (tick) begin ticks++; exp_sq = ~exp_sq; end
      @(posedge clk); #1;
      checks++;
      if (sq_out !== exp_sq) failures++;
    end
    // free running: measure the square-wave period
    en = 1;
    sq_prev = sq_out;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk); #1;
      if (sq_out && !sq_prev) begin
        if (last_rise >= 0) begin
          checks++; periods++;
          if (i - last_rise != 2 * DIV) begin
            failures++;
            $display("period %0d, expected %0d", i - last_rise, 2 * DIV);
          end
        end
        last_rise = i;
      end
      sq_prev = sq_out;
    end
    checks++;
    if (ticks < 20 || periods < 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
