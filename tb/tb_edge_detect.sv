// tb_edge_detect: random input sequence; rise/fall are checked every cycle
// against the input values driven one and two cycles earlier.
`timescale 1ns/1ps
module tb_edge_detect;
  logic clk = 0, rst_n = 0, sig_in = 0;
  logic rise, fall;
  int checks = 0, failures = 0;
  bit prev1 = 0, prev2 = 0;   // input as registered one and two clocks ago

  edge_detect dut (.*);
  always #25 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nr = 0, nf = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      prev2 = prev1; prev1 = sig_in;   // what the edge just registered
      #1;
      checks++;
      if (rise !== (!prev2 && prev1) || fall !== (prev2 && !prev1)) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: rise=%b fall=%b hist=%b%b", i, rise, fall, prev2, prev1);
      end
      nr += rise; nf += fall;
      sig_in = ($urandom_range(0, 3) == 0) ? ~sig_in : sig_in;
    end
    checks++;
    if (nr < 10 || nf < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
