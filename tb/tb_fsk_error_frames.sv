// tb_fsk_error_frames: bit-error workload for the four demodulators.
// Frames of 24 random bits (each after a 4-bit 1010 preamble) are sent
// back to back on a 10.69 / 10.71 MHz BFSK IF at 1 kbit/s and sampled at
// 75 kHz. In three of every four frames 1 to 5 error bursts, each of random
// length up to one bit period, swap the transmitted tone. Each
// demodulator's bit-synchronised output is compared with the error-free
// data and the bit errors are totalled per demodulator. Self-checks: a frame
// without bursts must come out error-free from every demodulator, and in a
// frame with bursts a demodulator may only miss bits that a burst (widened
// by the demodulator's memory) touches, plus one per burst for the bit-sync
// realignment it causes.
`timescale 1ns/1ps
module tb_fsk_error_frames;
  localparam int  NFR = 16, NPRE = 4, NBITS = 24, FB = NPRE + NBITS;
  localparam int  NALL = NFR * FB;
  localparam real TB_NS = 1.0e6;
  localparam real TS_NS = 1.0e9 / 75.0e3;

  logic clk = 0, rst_n = 0, sample_clk = 0, comp_in = 0;
  logic baseband;
  logic [3:0] raw_bits, data_bits, data_valid;
  int checks = 0, failures = 0;

  bit  tx[NALL];
  real err_s[NFR][5], err_e[NFR][5];
  int  n_err[NFR];
  realtime t0;
  bit started = 0, tx_done = 0;

  fsk_demod_top dut (.*);
  always #25 clk = ~clk;

  initial begin
    #(NALL * 1.0e6 + 20.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // true if time t (ns after t0) lies in an error burst
  function automatic bit in_burst(real t);
    int fr = int'($floor(t / (TB_NS * FB)));
    if (fr < 0 || fr >= NFR) return 0;
    for (int e = 0; e < n_err[fr]; e++)
      if (t >= err_s[fr][e] && t < err_e[fr][e]) return 1;
    return 0;
  endfunction

  // transmitter with error bursts, comparator and 75 kHz sampling clock
  real ph = 0.0;
  initial begin
    for (int fr = 0; fr < NFR; fr++) begin
      for (int i = 0; i < NPRE; i++) tx[fr * FB + i] = ~i[0];
      for (int i = NPRE; i < FB; i++) tx[fr * FB + i] = $urandom_range(0, 1);
      n_err[fr] = (fr % 4 == 0) ? 0 : $urandom_range(1, 5);
      for (int e = 0; e < n_err[fr]; e++) begin
        err_s[fr][e] = TB_NS * (fr * FB + NPRE) + $urandom_range(0, NBITS * 1000 - 1) * 1.0e3;
        err_e[fr][e] = err_s[fr][e] + $urandom_range(1, 1000) * 1.0e3;
      end
    end
    forever begin
      real t, f;
      int  idx;
      bit  b;
      #(TS_NS / 2.0 - 1.0);
      t = started ? ($realtime - t0 + 1.0) : 0.0;
      idx = int'($floor(t / TB_NS));
      if (started && idx >= NALL) tx_done = 1;
      if (idx >= NALL) idx = NALL - 1;
      b = tx[idx] ^ (started && in_burst(t));
      f = b ? 10.71e6 : 10.69e6;
      ph += f * TS_NS * 1.0e-9;
      ph -= $floor(ph);
      comp_in = (ph < 0.5);
      #1.0 sample_clk = 1;
      #(TS_NS / 2.0) sample_clk = 0;
    end
  end

  // output bookkeeping: strobe -> transmitted bit, as in the end-to-end test
  real lat[4] = '{200.0e3, 80.0e3, 120.0e3, 170.0e3};
  int  bit_err[4][NFR], total[4];
  initial begin
    foreach (bit_err[i, j]) bit_err[i][j] = 0;
    foreach (total[i]) total[i] = 0;
  end

  always @(posedge clk) begin
    #1;
    for (int i = 0; i < 4; i++)
      if (started && data_valid[i]) begin
        int idx;
        idx = int'($floor(($realtime - t0 - lat[i]) / TB_NS));
        if (idx >= 0 && idx < NALL && (idx % FB) >= NPRE && data_bits[i] !== ~tx[idx]) begin
          bit_err[i][idx / FB]++;
          total[i]++;
        end
      end
  end

  // bits of a frame a burst can disturb: any bit whose interval, extended
  // by 0.5 ms on both sides for demodulator memory and sampling, meets it
  function automatic int touched(int fr);
    int n = 0;
    for (int k = NPRE; k < FB; k++) begin
      real a = TB_NS * (fr * FB + k) - 0.5 * TB_NS, b = a + 2.0 * TB_NS;
      bit hit = 0;
      for (int e = 0; e < n_err[fr]; e++)
        if (err_s[fr][e] < b && err_e[fr][e] > a) hit = 1;
      n += hit;
    end
    return n + n_err[fr];
  endfunction

  initial begin
    int n_clean = 0, n_dirty = 0;
    real err_time;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    started = 1; t0 = $realtime;
    wait (tx_done);
    #(TB_NS);
    for (int fr = 0; fr < NFR; fr++) begin
      err_time = 0.0;
      for (int e = 0; e < n_err[fr]; e++) err_time += err_e[fr][e] - err_s[fr][e];
      $display("frame %2d: %0d bursts, %5.1f %% of the frame, bit errors %0d %0d %0d %0d",
               fr, n_err[fr], 100.0 * err_time / (NBITS * TB_NS),
               bit_err[0][fr], bit_err[1][fr], bit_err[2][fr], bit_err[3][fr]);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (n_err[fr] == 0 ? bit_err[i][fr] != 0 : bit_err[i][fr] > touched(fr)) begin
          failures++;
          $display("  demod %0d: %0d errors, allowed %0d", i, bit_err[i][fr], n_err[fr] ? touched(fr) : 0);
        end
      end
      if (n_err[fr] == 0) n_clean++; else n_dirty++;
    end
    $display("total bit errors: counter %0d, one-shot %0d, PFD %0d, PFD+preprocessor %0d",
             total[0], total[1], total[2], total[3]);
    checks++;
    if (n_clean == 0 || n_dirty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
