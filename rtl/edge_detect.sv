// edge_detect: rising and falling edge pulses of a 1-bit signal.
//
// A two-bit history register holds the input as seen on the last two clock
// edges; 01 marks a rising edge and 10 a falling edge. Both outputs are
// combinational decodes of the history, so each is high for exactly one clock,
// one to two clocks after the input changes. The input must already be
// synchronous to clk (the 1-bit sampler provides that). This is the
// edge detector every demodulator in the design uses; the reset value of the
// history (all zero) is this implementation's choice.
module edge_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic sig_in,
  output logic rise,
  output logic fall
);
  logic [1:0] hist;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) hist <= '0;
    else        hist <= {hist[0], sig_in};

  assign rise = ~hist[1] &  hist[0];
  assign fall =  hist[1] & ~hist[0];
endmodule
