// counter_demod: period-counting BFSK demodulator (the "Counter").
//
// The time between two rising edges of the baseband input is measured in
// ticks of a slow counting clock (a tick every TICK_DIV system clocks, 1 MHz by
// default). Each finished period count is pushed into a four-entry history and
// the sum of the last four, N_count, is the demodulator's pseudo-analog
// output: about 4*f_tick/f_in, i.e. 114 for 35 kHz and 266 for 15 kHz.
// Summing four periods both spreads the two values apart and averages out
// the period jitter of 1-bit subsampling. bit_out is 1 (f_H) while N_count is
// below THRESHOLD and 0 (f_L) above it. N_count is updated two clocks after
// each rising input edge. The period counter saturates when the input stops.
// Counting, four-period accumulation, 1 MHz count clock and threshold 186
// follow the design study; output polarity (1 = higher frequency), widths and
// saturation are this implementation's.
module counter_demod #(
  parameter int unsigned TICK_DIV  = 20,
  parameter int unsigned THRESHOLD = 186,
  parameter int unsigned CNT_W     = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sig_in,
  output logic [CNT_W-1:0] n_count,
  output logic             bit_out
);
  localparam int unsigned PW = CNT_W - 2;   // width of one period count

  logic rise, fall_unused;
  logic tick, tick_sq_unused;
  logic [PW-1:0] cur;
  logic [PW-1:0] hist [4];

  edge_detect u_edge (.clk, .rst_n, .sig_in, .rise, .fall(fall_unused));
  clk_div #(.DIV(TICK_DIV)) u_tick (.clk, .rst_n, .en(1'b1),
                                    .sq_out(tick_sq_unused), .tick);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur <= '0;
      for (int i = 0; i < 4; i++) hist[i] <= '0;
    end else if (rise) begin
      hist[0] <= cur;
      for (int i = 1; i < 4; i++) hist[i] <= hist[i-1];
      cur     <= '0;
    end else if (tick && cur != '1) begin
      cur <= cur + 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) n_count <= '0;
    else        n_count <= CNT_W'(hist[0]) + CNT_W'(hist[1])
                         + CNT_W'(hist[2]) + CNT_W'(hist[3]);

  assign bit_out = (n_count < CNT_W'(THRESHOLD));
endmodule
