// tb_pfd_demod: PFD demodulator with ideal 35 kHz / 15 kHz inputs.
// Checks the 25 kHz reference (800-clock period), that UP minus DOWN settles
// clearly positive for 35 kHz and clearly negative for 15 kHz, that bit_out
// follows (threshold 0), and that the decision changes within one averaging
// window (3000 clocks) of a tone change plus a margin.
`timescale 1ns/1ps
module tb_pfd_demod;
  logic clk = 0, rst_n = 0, sig_in = 0;
  logic ref_out, up, down, bit_out;
  logic signed [10:0] up_down;
  int checks = 0, failures = 0;
  real f_gen = 35_000.0, phase = 0.0;

  pfd_demod dut (.*);
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

  // reference period
  int last_ref = -1, cyc = 0;
  bit ref_q = 0;
  always @(posedge clk) begin
    #1; cyc++;
    if (ref_out && !ref_q) begin
      if (last_ref >= 0) begin
        checks++;
        if (cyc - last_ref != 800) begin failures++; $display("ref period %0d", cyc - last_ref); end
      end
      last_ref = cyc;
    end
    ref_q = ref_out;
  end

  task automatic settle_and_check(input real f, input bit b);
    int t = 0;
    f_gen = f;
    while (bit_out !== b && t < 8000) begin @(posedge clk); t++; end
    checks++;
    if (t > 3600) begin failures++; $display("slow switch: %0d clocks", t); end
    repeat (3000) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      repeat (13) @(posedge clk);
      #1;
      checks++;
      if ((b && up_down < 200) || (!b && up_down > -200) || bit_out !== b) begin
        failures++;
        if (failures < 8) $display("f=%0.0f up_down=%0d bit=%b", f, up_down, bit_out);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) begin
      settle_and_check(35_000.0, 1);
      settle_and_check(15_000.0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
