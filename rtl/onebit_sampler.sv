// onebit_sampler: 1-bit subsampler of the IF comparator output.
//
// An external comparator slices the 10.7 MHz IF to one bit. This block
// captures that level on every rising edge of sample_clk (75 kHz), which
// aliases the two BFSK tones 10.69 / 10.71 MHz down to 35 / 15 kHz. The
// captured bit is then brought into the 20 MHz system domain through a
// two-flip-flop synchroniser. sample_clk must be a clean clock at fs: the
// aliased frequency depends directly on it (f_a = |f_in - W*fs|), which is
// why it is a separate input and not derived from the 20 MHz clock, whose
// 266.67-cycle sample interval is not an integer. sample_tick is high for one
// system clock when a new sample has arrived. Latency: 2 to 3 system clocks
// after the sample_clk edge. Subsampling at 75 kHz follows the design study;
// the separate sample clock and the synchroniser are this implementation's.
module onebit_sampler (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_clk,
  input  logic comp_in,
  output logic bb_out,
  output logic sample_tick
);
  logic smp;        // sample_clk domain
  logic tgl;        // toggles on every sample, marks its arrival
  logic [1:0] sync_d;
  logic [2:0] sync_t;

  always_ff @(posedge sample_clk or negedge rst_n)
    if (!rst_n) begin
      smp <= 1'b0;
      tgl <= 1'b0;
    end else begin
      smp <= comp_in;
      tgl <= ~tgl;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sync_d <= '0;
      sync_t <= '0;
    end else begin
      sync_d <= {sync_d[0], smp};
      sync_t <= {sync_t[1:0], tgl};
    end

  assign bb_out      = sync_d[1];
  assign sample_tick = sync_t[2] ^ sync_t[1];
endmodule
