// tb_nco: the regenerated square wave for a set of period settings.
// For each even period P the output must be high for P/2 and low for P/2
// clocks; an odd period gives (P-1)/2 each. A period below 2 must stop the
// oscillator with the output low.
`timescale 1ns/1ps
module tb_nco;
  logic clk = 0, rst_n = 0;
  logic [15:0] period = 0;
  logic sq_out;
  int checks = 0, failures = 0;

  nco #(.W(16)) dut (.*);
  always #25 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int p);
    int h = p / 2, run = 0;
    bit prev;
    period = 16'(p);
    // skip two toggles so the new setting is in force
    @(posedge sq_out); @(negedge sq_out);
    prev = sq_out;
    for (int n = 0; n < 10 * p; n++) begin
      @(posedge clk); #1;
      if (sq_out == prev) run++;
      else begin
        checks++;
        if (run + 1 != h) begin
          failures++; $display("period %0d: phase of %0d clocks, expected %0d", p, run + 1, h);
        end
        run = 0;
      end
      prev = sq_out;
    end
  endtask

  initial begin
    int p_list[8] = '{571, 572, 1333, 1142, 2666, 2, 3, 800};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (50) @(posedge clk);
    checks++;
    if (sq_out !== 0) failures++;          // period 0: stopped
    foreach (p_list[i]) measure(p_list[i]);
    for (int k = 0; k < 10; k++) measure($urandom_range(4, 4000));
    period = 1;
    repeat (5) @(posedge clk);
    repeat (50) begin
      @(posedge clk); #1;
      checks++;
      if (sq_out !== 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
