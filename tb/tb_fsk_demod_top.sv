// tb_fsk_demod_top: end-to-end run of the whole receiver at its default
// parameters. A continuous-phase BFSK IF (10.69 / 10.71 MHz, 1 kbit/s)
// carrying a 24-bit random frame after a 4-bit 1010 preamble is sliced by a
// modelled comparator and sampled at 75 kHz. Because 10.71 MHz aliases to
// 15 kHz and 10.69 MHz to 35 kHz, every demodulator must deliver the
// inverted frame on data_bits. Each bit-sync strobe is matched to the
// transmitted bit whose middle lies closest to (strobe time - demodulator
// delay); all 24 frame bits must come out right from all four demodulators,
// with exactly one strobe per bit period. The run also counts the mechanisms
// of the design and fails if one never happened: threshold crossings in
// both directions, merged one-shot pulses, UP and DOWN PFD pulses, uneven
// baseband periods (1-bit sampling distortion) and their smoothing by the
// preprocessor, bit-sync realignment on transitions and free-running over
// runs of equal bits.
`timescale 1ns/1ps
module tb_fsk_demod_top;
  localparam int  NPRE = 4, NBITS = 24;
  localparam real TB_NS = 1.0e6;          // bit period
  localparam real TS_NS = 1.0e9 / 75.0e3; // sample period

  logic clk = 0, rst_n = 0, sample_clk = 0, comp_in = 0;
  logic baseband;
  logic [3:0] raw_bits, data_bits, data_valid;
  int checks = 0, failures = 0;

  bit tx[NPRE + NBITS];
  realtime t0;
  bit started = 0, tx_done = 0;

  fsk_demod_top dut (.*);
  always #25 clk = ~clk;

  initial begin
    #60_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- transmitter, IF comparator and 75 kHz sampling clock ------------
  real ph = 0.0;
  initial begin
    for (int i = 0; i < NPRE; i++) tx[i] = ~i[0];
    for (int i = NPRE; i < NPRE + NBITS; i++) tx[i] = $urandom_range(0, 1);
    forever begin
      real f;
      int  idx;
      #(TS_NS / 2.0 - 1.0);
      idx = started ? int'(($realtime - t0) / TB_NS - 0.5) : 0;
      if (started && ($realtime - t0) >= TB_NS * (NPRE + NBITS)) tx_done = 1;
      if (idx < 0) idx = 0;
      if (idx >= NPRE + NBITS) idx = NPRE + NBITS - 1;
      f = tx[idx] ? 10.71e6 : 10.69e6;
      ph += f * TS_NS * 1.0e-9;            // continuous phase
      ph -= $floor(ph);
      comp_in = (ph < 0.5);
      #1.0 sample_clk = 1;
      #(TS_NS / 2.0) sample_clk = 0;
    end
  end

  // ---- receiver output checks --------------------------------------------
  // demodulator delays (raw decision behind the IF), in ns: the counter
  // needs about four low-tone periods, the others about one averaging window
  real lat[4] = '{200.0e3, 80.0e3, 120.0e3, 170.0e3};
  int  got[4] = '{0, 0, 0, 0};
  int  hits[4][NPRE + NBITS];
  initial foreach (hits[i, j]) hits[i][j] = 0;

  always @(posedge clk) begin
    #1;
    for (int i = 0; i < 4; i++)
      if (rst_n && started && data_valid[i]) begin
        int idx;
        idx = int'($floor(($realtime - t0 - lat[i]) / TB_NS));
        if (idx >= NPRE && idx < NPRE + NBITS) begin
          hits[i][idx]++;
          checks++;
          got[i]++;
          if (data_bits[i] !== ~tx[idx]) begin
            failures++;
            $display("demod %0d bit %0d: got %b expected %b", i, idx - NPRE, data_bits[i], ~tx[idx]);
          end
        end
      end
  end

  // ---- mechanism counters --------------------------------------------------
  int n_thr_up[4] = '{0, 0, 0, 0}, n_thr_dn[4] = '{0, 0, 0, 0};
  int n_merge = 0, n_up = 0, n_dn = 0, n_resync = 0, n_free = 0;
  int bb_min = 1 << 30, bb_max = 0, pf_min = 1 << 30, pf_max = 0;
  logic [3:0] raw_q = 0;
  bit up_q = 0, dn_q = 0, bb_q = 0, seen_edge[4] = '{0, 0, 0, 0};
  int cyc = 0, bb_last = 0, bb_run = 0;
  always @(posedge clk) begin
    #2;
    cyc++;
    if (rst_n && started) begin
      for (int i = 0; i < 4; i++) begin
        if (raw_bits[i] && !raw_q[i]) n_thr_up[i]++;
        if (!raw_bits[i] && raw_q[i]) n_thr_dn[i]++;
        if (raw_bits[i] != raw_q[i]) seen_edge[i] = 1;
        if (data_valid[i]) begin
          if (seen_edge[i]) n_resync++; else n_free++;
          seen_edge[i] = 0;
        end
      end
      if (dut.u_oneshot.u_pulse.trig && dut.u_oneshot.u_pulse.pulse) n_merge++;
      if (dut.u_pfd.up && !up_q) n_up++;
      if (dut.u_pfd.down && !dn_q) n_dn++;
      // baseband periods while the 35 kHz tone is on (transmit bit 0)
      if (baseband && !bb_q) begin
        if (cyc - bb_last < 1000) bb_run++; else bb_run = 0;
        if (bb_run >= 6) begin                 // well inside a 35 kHz stretch
          if (cyc - bb_last < bb_min) bb_min = cyc - bb_last;
          if (cyc - bb_last > bb_max) bb_max = cyc - bb_last;
          if (dut.u_ppd.period_f < pf_min) pf_min = dut.u_ppd.period_f;
          if (dut.u_ppd.period_f > pf_max) pf_max = dut.u_ppd.period_f;
        end
        bb_last = cyc;
      end
    end
    raw_q = raw_bits; up_q = dut.u_pfd.up; dn_q = dut.u_pfd.down; bb_q = baseband;
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n < 1) begin failures++; $display("  mechanism never exercised: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    started = 1; t0 = $realtime;
    wait (tx_done);
    #(TB_NS);                               // flush the last bit
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (got[i] != NBITS) begin failures++; $display("demod %0d: %0d of %0d frame bits", i, got[i], NBITS); end
      for (int j = NPRE; j < NPRE + NBITS; j++)
        if (hits[i][j] != 1) begin
          checks++; failures++;
          $display("demod %0d: bit %0d sampled %0d times", i, j - NPRE, hits[i][j]);
        end
    end
    $display("mechanisms:");
    for (int i = 0; i < 4; i++) begin
      need($sformatf("demod %0d decision rises", i), n_thr_up[i]);
      need($sformatf("demod %0d decision falls", i), n_thr_dn[i]);
    end
    need("one-shot retriggered while high", n_merge);
    need("PFD UP pulses", n_up);
    need("PFD DOWN pulses", n_dn);
    need("bit-sync realign on transition", n_resync);
    need("bit-sync free-run over equal bits", n_free);
    need("uneven 35 kHz baseband periods", bb_max - bb_min);
    $display("  baseband 35 kHz periods %0d..%0d, preprocessed %0d..%0d", bb_min, bb_max, pf_min, pf_max);
    checks++;
    if (pf_max - pf_min >= bb_max - bb_min) begin failures++; $display("  preprocessor did not smooth"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
