// tb_oneshot_demod: ideal 35 kHz and 15 kHz inputs at 20 MHz.
// The averaged pulse level must approach 1333 for 35 kHz (pulses merge, only
// the gaps of T_H - PULSE_LEN < 1 clock remain) and T_H/T_L*1333 = 571 for
// 15 kHz; bit_out 1 for 35 kHz and 0 for 15 kHz. After a tone change the
// decision must follow within one averaging window plus one f_L period.
`timescale 1ns/1ps
module tb_oneshot_demod;
  logic clk = 0, rst_n = 0, sig_in = 0;
  logic [10:0] avg;
  logic bit_out;
  int checks = 0, failures = 0;
  real f_gen = 35_000.0, phase = 0.0;

  oneshot_demod dut (.*);
  always #25 clk = ~clk;
  always @(negedge clk) begin
    phase += f_gen * 50.0e-9;
    if (phase >= 1.0) phase -= 1.0;
    sig_in = (phase < 0.5);
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic settle_and_check(input real f, input int lo, input int hi, input bit b);
    int t = 0;
    f_gen = f;
    // decision must switch within window + one f_L period (2666 clocks)
    while (bit_out !== b && t < 4000) begin @(posedge clk); t++; end
    checks++;
    if (t > 2666) begin failures++; $display("slow switch: %0d clocks", t); end
    repeat (2666) @(posedge clk);
    for (int k = 0; k < 400; k++) begin
      repeat (17) @(posedge clk);
      #1;
      checks++;
      if (avg < lo || avg > hi || bit_out !== b) begin
        failures++;
        if (failures < 8) $display("f=%0.0f avg=%0d bit=%b", f, avg, bit_out);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) begin
      settle_and_check(35_000.0, 1320, 1333, 1);
      settle_and_check(15_000.0, 560, 580, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
