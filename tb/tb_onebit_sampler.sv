// tb_onebit_sampler: 1-bit subsampling of a 10.7 MHz BFSK IF at 75 kHz.
// The comparator is modelled by the sign of a sine evaluated at each sampling
// instant. Checks: every sample_tick delivers the expected comparator bit, in
// order, within 4 system clocks of the sampling edge; and the baseband has the
// alias frequency f_a = |f_in - W*fs|: 10.69 MHz gives 35 kHz (700 rising
// edges in 20 ms) and 10.71 MHz gives 15 kHz (300 in 20 ms).
`timescale 1ns/1ps
module tb_onebit_sampler;
  logic clk = 0, rst_n = 0, sample_clk = 0, comp_in = 0;
  logic bb_out, sample_tick;
  int checks = 0, failures = 0;
  real f_if = 10.69e6;
  bit exp_q[$];
  realtime t_edge;
  int n_rise = 0;

  onebit_sampler dut (.*);
  always #25 clk = ~clk;

  // sampling clock and comparator model
  initial begin
    forever begin
      #(13333.3333 / 2.0 - 1.0);
      t_edge = $realtime + 1.0;
      comp_in = ($sin(2.0 * 3.14159265358979 * f_if * t_edge * 1.0e-9 + 0.3) > 0.0);
      exp_q.push_back(comp_in);
      #1.0 sample_clk = 1;
      #(13333.3333 / 2.0) sample_clk = 0;
    end
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bb_q = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && sample_tick) begin
      checks++;
      if (exp_q.size() == 0) failures++;
      else begin
        bit e;
        e = exp_q.pop_front();
        if (bb_out !== e) begin failures++; $display("%t: sample %b expected %b", $time, bb_out, e); end
      end
      checks++;
      if ($realtime - t_edge > 4 * 50.0) begin failures++; $display("late sample %t", $realtime - t_edge); end
    end
    if (bb_out && !bb_q) n_rise++;
    bb_q = bb_out;
  end

  task automatic count_alias(input real f, input int exp_rises);
    f_if = f;
    #2_000_000;                 // let the new tone settle
    n_rise = 0;
    #20_000_000;
    checks++;
    if (n_rise < exp_rises - 2 || n_rise > exp_rises + 2) begin
      failures++; $display("f_if=%0.0f: %0d rising edges in 20 ms, expected %0d", f, n_rise, exp_rises);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge sample_clk);
    exp_q.delete();
    @(negedge clk) rst_n = 1;
    count_alias(10.69e6, 700);
    count_alias(10.71e6, 300);
    count_alias(10.69e6, 700);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
