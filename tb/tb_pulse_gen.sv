// tb_pulse_gen: random triggers, some closer together than the pulse length.
// The expected output is worked out from the trigger times alone: the pulse
// is high in a cycle iff the most recent trigger was 1..PULSE_LEN clocks ago.
// Also checks the length of an isolated pulse (571 clocks = one 35 kHz period).
`timescale 1ns/1ps
module tb_pulse_gen;
  localparam int PULSE_LEN = 571;
  logic clk = 0, rst_n = 0, trig = 0;
  logic pulse;
  int checks = 0, failures = 0;

  pulse_gen #(.PULSE_LEN(PULSE_LEN)) dut (.*);
  always #25 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_trig = -1_000_000, width = 0, widths_ok = 0, retrig = 0;
    bit exp_p;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 200_000; i++) begin
      @(negedge clk);
      trig = ($urandom_range(0, 799) == 0);
      @(posedge clk);
      if (trig) begin
        if (i - last_trig <= PULSE_LEN) retrig++;
        last_trig = i;
      end
      #1;
      exp_p = (i - last_trig >= 0) && (i - last_trig < PULSE_LEN) && (last_trig >= 0);
      checks++;
      if (pulse !== exp_p) begin
        failures++;
        if (failures < 5) $display("cycle %0d: pulse=%b expected %b", i, pulse, exp_p);
      end
      if (pulse) width++;
      else begin
        if (width == PULSE_LEN) widths_ok++;
        width = 0;
      end
    end
    checks++;
    if (widths_ok < 10 || retrig < 5) begin
      failures++;
      $display("isolated pulses %0d retriggers %0d", widths_ok, retrig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
