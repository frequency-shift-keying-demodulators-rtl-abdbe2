// oneshot_demod: edge-density BFSK demodulator (the "One-Shot").
//
// Each rising edge of the baseband input fires a one-shot pulse one f_H period
// long. For a 35 kHz input the pulses merge into a steady high level; for a
// 15 kHz input they cover T_H/T_L = 43 % of the time. A moving average over
// one f_L period (1333 clocks) turns this into a pseudo-analog level of about
// 1333 for f_H and 571 for f_L, and bit_out is 1 while the level exceeds
// THRESHOLD (952, midway). avg follows the input with the averaging window's
// delay of up to AVG_LEN clocks. Structure, pulse length, window and threshold
// follow the design study; the output polarity 1 = f_H is this
// implementation's choice.
module oneshot_demod #(
  parameter int unsigned PULSE_LEN = 571,
  parameter int unsigned AVG_LEN   = 1333,
  parameter int unsigned THRESHOLD = 952
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         sig_in,
  output logic [$clog2(AVG_LEN+1)-1:0] avg,
  output logic                         bit_out
);
  logic rise, fall_unused, pulse;

  edge_detect u_edge (.clk, .rst_n, .sig_in, .rise, .fall(fall_unused));
  pulse_gen #(.PULSE_LEN(PULSE_LEN)) u_pulse (.clk, .rst_n, .trig(rise), .pulse);
  moving_avg #(.LEN(AVG_LEN), .DECIM(1)) u_avg (.clk, .rst_n, .din(pulse), .sum(avg));

  assign bit_out = (avg > ($clog2(AVG_LEN+1))'(THRESHOLD));
endmodule
