// moving_avg: running count of ones over a window of a 1-bit stream.
//
// Every DECIM-th clock the input bit is shifted into a LEN-bit shift register.
// A counter tracks the number of ones in the register: it increments when a 1
// enters and a 0 leaves, decrements in the opposite case, and holds otherwise,
// so the sum needs one adder regardless of LEN. The window therefore spans
// LEN*DECIM system clocks. sum is registered and changes the clock after a
// shift. The shift-register-and-counter structure and the decimation by a skip
// counter follow the design study; the output width is exactly what LEN needs.
module moving_avg #(
  parameter int unsigned LEN   = 1000,
  parameter int unsigned DECIM = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       din,
  output logic [$clog2(LEN+1)-1:0]   sum
);
  localparam int unsigned DW = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [LEN-1:0] window;
  logic [DW-1:0]  skip;
  logic           shift_en;

  assign shift_en = (skip == DW'(DECIM - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      window <= '0;
      sum    <= '0;
      skip   <= '0;
    end else begin
      skip <= shift_en ? '0 : skip + 1'b1;
      if (shift_en) begin
        window <= {window[LEN-2:0], din};
        if (din && !window[LEN-1])      sum <= sum + 1'b1;
        else if (!din && window[LEN-1]) sum <= sum - 1'b1;
      end
    end

  // The running count can never exceed the window length.
  a_range: assert property (@(posedge clk) disable iff (!rst_n)
                            sum <= ($clog2(LEN+1))'(LEN));
endmodule
