// binomial_filter: fourth-order binomial average of successive samples.
//
// On each in_valid the new sample enters a three-deep history and the output
// becomes (x[n] + 3x[n-1] + 3x[n-2] + x[n-3]) / 8, the binomial weights 1-3-3-1
// normalised by their sum. The weighted sum is formed as a cascade of pairwise
// sums, (a+b), (b+c), ... which is the add-only structure of the design study;
// the division by 8 is a shift. dout is registered and changes the clock after
// in_valid; out_valid marks that clock. Before four samples have arrived the
// missing history entries count as zero.
module binomial_filter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         out_valid
);
  logic [W-1:0] x1, x2, x3;            // x[n-1], x[n-2], x[n-3]
  logic [W:0]   s01, s12, s23;         // pairwise sums, first stage
  logic [W+1:0] s012, s123;            // second stage
  logic [W+2:0] s0123;                 // third stage: weights 1,3,3,1

  always_comb begin
    s01   = {1'b0, din} + {1'b0, x1};
    s12   = {1'b0, x1}  + {1'b0, x2};
    s23   = {1'b0, x2}  + {1'b0, x3};
    s012  = {1'b0, s01} + {1'b0, s12};
    s123  = {1'b0, s12} + {1'b0, s23};
    s0123 = {1'b0, s012} + {1'b0, s123};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; x3 <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1   <= din;
        x2   <= x1;
        x3   <= x2;
        dout <= s0123[W+2:3];
      end
    end
endmodule
