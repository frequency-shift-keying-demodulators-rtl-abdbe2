// nco: numerically controlled square-wave oscillator.
//
// Generates a square wave whose period is the period input, in system clocks:
// a counter runs up to period/2 and toggles the output each time it gets
// there, so a high and a low phase of period/2 clocks each (an odd period
// loses its last clock). The period input may change at any time and takes
// effect at the next toggle. Periods below 2 stop the oscillator with the
// output low. In the PFD preprocessor this regenerates a BFSK waveform with
// even period lengths from the filtered period measurement, as in the design
// study; the half-period counter is this implementation's form of it.
module nco #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] period,
  output logic         sq_out
);
  logic [W-2:0] half, cnt;

  assign half = period[W-1:1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      sq_out <= 1'b0;
    end else if (half == '0) begin
      cnt    <= '0;
      sq_out <= 1'b0;
    end else if (cnt >= half - 1'b1) begin
      cnt    <= '0;
      sq_out <= ~sq_out;
    end else begin
      cnt    <= cnt + 1'b1;
    end
endmodule
