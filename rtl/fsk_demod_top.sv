// fsk_demod_top: 1-bit subsampling BFSK receiver with four demodulators.
//
// comp_in is the sliced 10.7 MHz IF. onebit_sampler captures it at the 75 kHz
// sample_clk and hands the aliased baseband (35 / 15 kHz tones) to the 20 MHz
// system domain. The baseband drives four demodulators side by side, the four
// candidates of the design study, so that they can be compared on one input:
//   index 0  counter_demod      period count summed over four periods
//   index 1  oneshot_demod      edge-triggered pulses, moving average
//   index 2  pfd_demod          PFD against a 25 kHz reference
//   index 3  pfd_preproc_demod  period/binomial/NCO preprocessor, then PFD
// raw_bits are their threshold decisions (1 = the 35 kHz baseband tone). Each
// goes through its own bit_sync, which delivers one sampled bit per bit period
// on data_bits with a strobe on data_valid. Note that at fs = 75 kHz the
// 10.71 MHz IF tone aliases to 15 kHz and 10.69 MHz to 35 kHz, so an IF
// "1 = higher tone" convention comes out inverted at data_bits.
// Running the four demodulators in parallel is this top level's choice; the
// study built and measured each on its own.
module fsk_demod_top
  import fsk_pkg::*;
(
  input  logic       clk,          // 20 MHz system clock
  input  logic       rst_n,        // asynchronous, active low
  input  logic       sample_clk,   // 75 kHz 1-bit sampling clock
  input  logic       comp_in,      // IF comparator output
  output logic       baseband,     // subsampled baseband BFSK
  output logic [3:0] raw_bits,
  output logic [3:0] data_bits,
  output logic [3:0] data_valid
);
  localparam int unsigned SW = $clog2(PFD_AVG_LEN + 1);

  logic sample_tick_unused;
  logic [11:0] n_count_unused;
  logic [$clog2(OS_AVG_LEN+1)-1:0] os_avg_unused;
  logic pfd_ref_unused, pfd_up_unused, pfd_dn_unused;
  logic signed [SW:0] pfd_ud_unused, ppd_ud_unused;
  logic [15:0] ppd_period_unused;
  logic ppd_regen_unused, ppd_up_unused, ppd_dn_unused;

  onebit_sampler u_sampler (.clk, .rst_n, .sample_clk, .comp_in,
                            .bb_out(baseband), .sample_tick(sample_tick_unused));

  counter_demod #(.TICK_DIV(CNT_TICK_DIV), .THRESHOLD(CNT_THRESHOLD), .CNT_W(12))
    u_counter (.clk, .rst_n, .sig_in(baseband), .n_count(n_count_unused),
               .bit_out(raw_bits[0]));

  oneshot_demod #(.PULSE_LEN(OS_PULSE_LEN), .AVG_LEN(OS_AVG_LEN), .THRESHOLD(OS_THRESHOLD))
    u_oneshot (.clk, .rst_n, .sig_in(baseband), .avg(os_avg_unused), .bit_out(raw_bits[1]));

  pfd_demod #(.REF_DIV(REF_DIV), .AVG_LEN(PFD_AVG_LEN), .AVG_DECIM(PFD_AVG_DECIM), .THRESHOLD(0))
    u_pfd (.clk, .rst_n, .sig_in(baseband), .ref_out(pfd_ref_unused), .up(pfd_up_unused),
           .down(pfd_dn_unused), .up_down(pfd_ud_unused), .bit_out(raw_bits[2]));

  pfd_preproc_demod #(.REF_DIV(REF_DIV), .AVG_LEN(PFD_AVG_LEN), .AVG_DECIM(PFD_AVG_DECIM),
                      .THRESHOLD(0), .PW(16))
    u_ppd (.clk, .rst_n, .sig_in(baseband), .period_f(ppd_period_unused),
           .regen(ppd_regen_unused), .up(ppd_up_unused), .down(ppd_dn_unused),
           .up_down(ppd_ud_unused), .bit_out(raw_bits[3]));

  for (genvar i = 0; i < 4; i++) begin : g_sync
    bit_sync #(.BIT_CYCLES(BIT_CYCLES))
      u_sync (.clk, .rst_n, .din(raw_bits[i]), .dout(data_bits[i]), .valid(data_valid[i]));
  end
endmodule
