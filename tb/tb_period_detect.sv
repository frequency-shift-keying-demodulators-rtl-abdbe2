// tb_period_detect: square waves whose every period is drawn at random
// (30..3000 clocks, random duty). Each valid strobe must report exactly the
// number of clocks between the last two rising input edges, and exactly one
// strobe must come per period.
`timescale 1ns/1ps
module tb_period_detect;
  logic clk = 0, rst_n = 0, sig_in = 0;
  logic [15:0] period;
  logic valid;
  int checks = 0, failures = 0;
  int exp_q[$];
  int n_valid = 0;
  int p_prev = 0;

  period_detect #(.W(16)) dut (.*);
  always #25 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (valid) begin
      n_valid++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected strobe, period %0d", period);
      end else begin
        int e;
        e = exp_q.pop_front();
        if (e >= 0 && period != 16'(e)) begin
          failures++; $display("period %0d expected %0d", period, e);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20) @(negedge clk);
    for (int k = 0; k < 300; k++) begin
      int p, h;
      p = $urandom_range(30, 3000);
      h = $urandom_range(1, p - 1);
      sig_in = 1;
      exp_q.push_back(k == 0 ? -1 : p_prev);
      repeat (h) @(negedge clk);
      sig_in = 0;
      repeat (p - h) @(negedge clk);
      p_prev = p;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_valid != 300 || exp_q.size() != 0) begin failures++; $display("%0d strobes", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
