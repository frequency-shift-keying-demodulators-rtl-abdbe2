// clk_div: clock divider producing a square wave and a tick, as data signals.
//
// A counter advances on every clock where en is high; after DIV advances it
// wraps and the square output toggles, so sq_out has a period of 2*DIV enabled
// clocks. tick is high for the one clock in which the toggle happens and serves
// as a clock enable for logic that runs at a lower rate. With DIV = 400 and a
// 20 MHz clock sq_out is the 25 kHz PFD reference. Dividing by toggling a
// register follows the design study; keeping the result a data signal inside
// the single clock domain (instead of clocking flip-flops with it) is this
// implementation's choice.
module clk_div #(
  parameter int unsigned DIV = 400
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic sq_out,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  logic [W-1:0] cnt;

  assign tick = en && (cnt == W'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      sq_out <= 1'b0;
    end else if (tick) begin
      cnt    <= '0;
      sq_out <= ~sq_out;
    end else if (en) begin
      cnt    <= cnt + 1'b1;
    end
endmodule
