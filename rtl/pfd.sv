// pfd: phase-frequency detector, two set/reset flip-flops and an AND gate.
//
// UP is set by a rising edge of in_a (the BFSK signal) and DOWN by a rising
// edge of in_b (the reference). When both are high the AND term clears both
// on the next clock, so the output whose input leads stays high until the
// other input's edge arrives. With in_a faster than in_b mostly UP pulses
// appear, with in_a slower mostly DOWN pulses; their widths follow the edge
// spacing (longest pulse T_L - T_clk, pulse-to-pulse shift T_L - T_H). The
// classic circuit of the design study clocks the two flip-flops with the inputs themselves and
// resets them asynchronously; here the inputs are edge-detected in the system
// clock domain and the flip-flops are synchronous, which gives the same pulse
// pattern quantised to the system clock without generated clocks. Both
// outputs rise one clock after the input edge is seen by the edge detector.
// An input edge seen in the clock in which both are cleared is dropped, as an
// edge during the reset pulse of the asynchronous circuit would be.
module pfd (
  input  logic clk,
  input  logic rst_n,
  input  logic in_a,
  input  logic in_b,
  output logic up,
  output logic down
);
  logic rise_a, rise_b, fall_a_unused, fall_b_unused;
  logic clr;

  edge_detect u_ea (.clk, .rst_n, .sig_in(in_a), .rise(rise_a), .fall(fall_a_unused));
  edge_detect u_eb (.clk, .rst_n, .sig_in(in_b), .rise(rise_b), .fall(fall_b_unused));

  assign clr = up & down;   // the AND gate

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      up   <= 1'b0;
      down <= 1'b0;
    end else if (clr) begin
      up   <= 1'b0;
      down <= 1'b0;
    end else begin
      up   <= up   | rise_a;
      down <= down | rise_b;
    end

  // The AND gate never lets both outputs stay high for two clocks.
  a_clear: assert property (@(posedge clk) disable iff (!rst_n)
                            (up && down) |=> !(up || down));
endmodule
