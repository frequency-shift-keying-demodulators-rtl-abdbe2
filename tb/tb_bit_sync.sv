// tb_bit_sync: random 1 kbit/s data (20000 clocks per bit) with a random
// starting phase and with runs of equal bits. Each valid strobe must carry
// the bit being transmitted, must come exactly mid-bit (9999 clocks after
// the first clock that sees a transition, i.e. half a bit later), and during
// runs of equal bits the strobes must keep coming every 20000 clocks.
`timescale 1ns/1ps
module tb_bit_sync;
  localparam int BC = 20000;
  logic clk = 0, rst_n = 0, din = 0;
  logic dout, valid;
  int checks = 0, failures = 0;
  int cyc = 0, last_change = -1, last_valid = -1, n_free = 0, n_aligned = 0;
  bit cur_bit = 0;

  bit_sync #(.BIT_CYCLES(BC)) dut (.*);
  always #25 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n && valid) begin
      checks++;
      if (dout !== cur_bit) begin failures++; $display("cycle %0d: bit %b expected %b", cyc, dout, cur_bit); end
      checks++;
      if (last_change < 0) begin
        n_free++;                                  // before any transition
      end else if (last_valid > last_change) begin
        n_free++;
        if (cyc - last_valid != BC) begin failures++; $display("free-run spacing %0d", cyc - last_valid); end
      end else begin
        n_aligned++;
        if (cyc - last_change != BC / 2 - 1) begin failures++; $display("mid-bit offset %0d", cyc - last_change); end
      end
      last_valid = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat ($urandom_range(100, 15000)) @(negedge clk);
    for (int k = 0; k < 120; k++) begin
      bit b;
      b = (k % 10 < 4) ? (k[0]) : ($urandom_range(0, 2) == 0 ? ~cur_bit : cur_bit);
      if (k % 10 >= 7) b = cur_bit;              // runs of equal bits
      if (b != din) last_change = cyc + 1;       // first clock that sees it
      din = b; cur_bit = b;
      repeat (BC) @(negedge clk);
    end
    checks++;
    if (n_free < 10 || n_aligned < 10) begin failures++; $display("free %0d aligned %0d", n_free, n_aligned); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
