// pfd_demod: phase-frequency-detector BFSK demodulator.
//
// A divider makes a fixed reference halfway between the two tones (25 kHz
// from 20 MHz, REF_DIV = 400 clocks per half period). The PFD compares the
// BFSK input with it: a 35 kHz input produces UP pulses, a 15 kHz input DOWN
// pulses. Each output is averaged by its own moving average (AVG_LEN taps, one
// every AVG_DECIM clocks) and the DOWN average is subtracted from the UP
// average. up_down is positive for f_H and negative for f_L, and bit_out is 1
// while it exceeds the signed THRESHOLD (0). Averages and difference are
// registered; a change of tone shows fully after one window (AVG_LEN*AVG_DECIM
// clocks). The structure, reference frequency, N = 1000 taps and threshold 0
// follow the design study; the reference is a free-running divider with no
// feedback, as in the study.
module pfd_demod #(
  parameter int unsigned REF_DIV   = 400,
  parameter int unsigned AVG_LEN   = 1000,
  parameter int unsigned AVG_DECIM = 3,
  parameter int          THRESHOLD = 0,
  localparam int unsigned SW = $clog2(AVG_LEN + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sig_in,
  output logic               ref_out,
  output logic               up,
  output logic               down,
  output logic signed [SW:0] up_down,
  output logic               bit_out
);
  logic ref_tick_unused;
  logic [SW-1:0] up_avg, down_avg;

  clk_div #(.DIV(REF_DIV)) u_ref (.clk, .rst_n, .en(1'b1), .sq_out(ref_out), .tick(ref_tick_unused));
  pfd u_pfd (.clk, .rst_n, .in_a(sig_in), .in_b(ref_out), .up, .down);
  moving_avg #(.LEN(AVG_LEN), .DECIM(AVG_DECIM)) u_avg_up (.clk, .rst_n, .din(up),   .sum(up_avg));
  moving_avg #(.LEN(AVG_LEN), .DECIM(AVG_DECIM)) u_avg_dn (.clk, .rst_n, .din(down), .sum(down_avg));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) up_down <= '0;
    else        up_down <= $signed({1'b0, up_avg}) - $signed({1'b0, down_avg});

  assign bit_out = (up_down > (SW+1)'(THRESHOLD));
endmodule
