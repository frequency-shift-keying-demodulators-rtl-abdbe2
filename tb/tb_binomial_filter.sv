// tb_binomial_filter: random sample values and random gaps between strobes.
// The expected output is the 1-3-3-1 weighted average of the last four
// samples, divided by 8 and truncated, computed directly from the sample
// history; it must appear the clock after the strobe and hold until the next.
`timescale 1ns/1ps
module tb_binomial_filter;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] din, dout;
  logic out_valid;
  int checks = 0, failures = 0;

  binomial_filter #(.W(16)) dut (.*);
  always #25 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x[4] = '{0, 0, 0, 0};
    longint e = 0;
    din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk);
        checks++;
        if (dout != 16'(e) || out_valid) begin failures++; $display("hold: dout %0d exp %0d", dout, e); end
      end
      @(negedge clk);
      din = (k < 1000) ? 16'($urandom_range(0, 65535)) : 16'($urandom_range(500, 1500));
      in_valid = 1;
      x[3] = x[2]; x[2] = x[1]; x[1] = x[0]; x[0] = din;
      e = (x[0] + 3 * x[1] + 3 * x[2] + x[3]) / 8;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (dout != 16'(e) || !out_valid) begin
        failures++;
        if (failures < 5) $display("sample %0d: dout %0d expected %0d", k, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
