// tb_moving_avg: the PFD averaging filter (1000 taps, one every 3rd clock).
// A reference keeps the last LEN sampled bits in a queue and counts the ones;
// the filter's sum must match it on every clock. The input runs through long
// runs of ones and zeros (to fill and empty the window) and random bits.
`timescale 1ns/1ps
module tb_moving_avg;
  localparam int LEN = 1000, DECIM = 3;
  logic clk = 0, rst_n = 0, din = 0;
  logic [$clog2(LEN+1)-1:0] sum;
  int checks = 0, failures = 0;

  moving_avg #(.LEN(LEN), .DECIM(DECIM)) dut (.*);
  always #25 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q[$];
    int ones = 0, phase = 0, max_sum = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 60_000; i++) begin
      if (i < 4000)        din = 1;
      else if (i < 8000)   din = 0;
      else if (i < 20000)  din = ($urandom_range(0, 3) != 0);
      else                 din = ($urandom_range(0, 1) == 0);
      @(posedge clk);
      if (phase == DECIM - 1) begin
        q.push_back(din); ones += din;
        if (q.size() > LEN) ones -= q.pop_front();
        phase = 0;
      end else phase++;
      #1;
      checks++;
      if (sum != ones) begin
        failures++;
        if (failures < 5) $display("cycle %0d: sum=%0d expected %0d", i, sum, ones);
      end
      if (sum > max_sum) max_sum = sum;
      @(negedge clk);
    end
    checks++;
    if (max_sum != LEN) failures++;   // the window was full of ones once
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
