// pulse_gen: retriggerable one-shot.
//
// Every trig pulse (re)loads a down-counter with PULSE_LEN; pulse is high
// while the counter is non-zero, so one trigger gives a pulse of exactly
// PULSE_LEN clocks starting the clock after trig. A new trigger during a pulse
// restarts it. With PULSE_LEN equal to one period of f_H (571 clocks at 20 MHz)
// pulses triggered by a 35 kHz input join into a steady high level, while a
// 15 kHz input gives a 43 % duty cycle. Behaviour and pulse length follow the
// design study.
module pulse_gen #(
  parameter int unsigned PULSE_LEN = 571
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic pulse
);
  localparam int unsigned W = $clog2(PULSE_LEN + 1);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          cnt <= '0;
    else if (trig)       cnt <= W'(PULSE_LEN);
    else if (cnt != '0)  cnt <= cnt - 1'b1;

  assign pulse = (cnt != '0);
endmodule
