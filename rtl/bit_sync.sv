// bit_sync: bit synchroniser, samples a raw decision in mid-bit.
//
// A bit timer counts BIT_CYCLES system clocks per bit (20000 for 1 kbit/s at
// 20 MHz). Every transition of din restarts it, which aligns the bit boundary
// with the data; halfway through the bit (BIT_CYCLES/2 clocks after the last
// boundary) din is copied to dout and valid pulses for one clock. During runs
// of equal bits there are no transitions and the timer free-runs at the bit
// rate. The realign-on-edge, sample-at-mid-bit scheme follows the design
// study, which does the same with a divided clock; here it is a counter in the
// system clock domain.
module bit_sync #(
  parameter int unsigned BIT_CYCLES = 20000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout,
  output logic valid
);
  localparam int unsigned W = $clog2(BIT_CYCLES);
  logic [W-1:0] cnt;
  logic         din_q;
  logic         edge_seen;

  assign edge_seen = din ^ din_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      din_q <= 1'b0;
      cnt   <= '0;
      dout  <= 1'b0;
      valid <= 1'b0;
    end else begin
      din_q <= din;
      valid <= 1'b0;
      if (edge_seen)                        cnt <= W'(1);
      else if (cnt == W'(BIT_CYCLES - 1))   cnt <= '0;
      else                                  cnt <= cnt + 1'b1;
      if (!edge_seen && cnt == W'(BIT_CYCLES / 2 - 1)) begin
        dout  <= din;
        valid <= 1'b1;
      end
    end

  // valid is a single-clock strobe.
  a_single: assert property (@(posedge clk) disable iff (!rst_n)
                             valid |=> !valid);
endmodule
