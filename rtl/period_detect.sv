// period_detect: measures the input period in system clocks.
//
// A counter runs between rising edges of the input; at each rising edge its
// value, the number of clocks since the previous rising edge, is copied to
// period and valid pulses for one clock. The counter saturates at its maximum
// when the input stops toggling. This is the first stage of the PFD
// preprocessor; it is the Counter demodulator's period count without the
// four-period accumulator, as in the design study. Counting system clocks (not
// a slower tick) and the saturation are this implementation's choices.
module period_detect #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sig_in,
  output logic [W-1:0] period,
  output logic         valid
);
  logic rise, fall_unused;
  logic [W-1:0] cnt;

  edge_detect u_edge (.clk, .rst_n, .sig_in, .rise, .fall(fall_unused));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= W'(1);
      period <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= rise;
      if (rise) begin
        period <= cnt;
        cnt    <= W'(1);
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
endmodule
