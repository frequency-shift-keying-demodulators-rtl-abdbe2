// pfd_preproc_demod: PFD demodulator with an input preprocessor.
//
// 1-bit subsampling leaves the baseband tones with uneven periods (at 75 kHz
// a 35 kHz tone is built from 2- and 3-sample cycles). The preprocessor
// removes that jitter before the PFD: period_detect measures every input
// period in system clocks, binomial_filter averages the last four periods with
// weights 1-3-3-1, and the nco regenerates a square wave with that average
// period. The regenerated wave (regen) drives an ordinary pfd_demod. The
// preprocessor adds about two input periods of delay. Chain and parameters
// follow the design study; widths are this implementation's.
module pfd_preproc_demod #(
  parameter int unsigned REF_DIV   = 400,
  parameter int unsigned AVG_LEN   = 1000,
  parameter int unsigned AVG_DECIM = 3,
  parameter int          THRESHOLD = 0,
  parameter int unsigned PW        = 16,
  localparam int unsigned SW = $clog2(AVG_LEN + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sig_in,
  output logic [PW-1:0]      period_f,
  output logic               regen,
  output logic               up,
  output logic               down,
  output logic signed [SW:0] up_down,
  output logic               bit_out
);
  logic [PW-1:0] period;
  logic          period_valid, filt_valid_unused, ref_unused;

  period_detect   #(.W(PW)) u_per (.clk, .rst_n, .sig_in, .period, .valid(period_valid));
  binomial_filter #(.W(PW)) u_bin (.clk, .rst_n, .in_valid(period_valid), .din(period),
                                   .dout(period_f), .out_valid(filt_valid_unused));
  nco             #(.W(PW)) u_nco (.clk, .rst_n, .period(period_f), .sq_out(regen));

  pfd_demod #(.REF_DIV(REF_DIV), .AVG_LEN(AVG_LEN), .AVG_DECIM(AVG_DECIM),
              .THRESHOLD(THRESHOLD))
    u_pfd (.clk, .rst_n, .sig_in(regen), .ref_out(ref_unused), .up, .down,
           .up_down, .bit_out);
endmodule
