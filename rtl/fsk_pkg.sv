// fsk_pkg: frequency plan shared by the BFSK demodulators.
//
// The receiver runs from one 20 MHz system clock. After 1-bit subsampling of
// the 10.7 MHz IF at 75 kHz the two BFSK tones sit at 35 kHz (f_H) and
// 15 kHz (f_L) and carry 1 kbit/s. The PFD reference sits half way between
// them at 25 kHz. All divider lengths, pulse lengths and thresholds used by the
// demodulators are derived here from those frequencies, so that retargeting
// the receiver to another frequency plan means editing this package only.
// The frequencies and the 186 / 952 / 0 thresholds follow the design study;
// the integer rounding of the derived constants is this implementation's.
package fsk_pkg;
  localparam int unsigned CLK_HZ   = 20_000_000;  // system clock
  localparam int unsigned FS_HZ    = 75_000;      // 1-bit sample rate
  localparam int unsigned F_H_HZ   = 35_000;      // baseband high tone (data 1)
  localparam int unsigned F_L_HZ   = 15_000;      // baseband low tone (data 0)
  localparam int unsigned F_REF_HZ = 25_000;      // PFD reference
  localparam int unsigned BIT_RATE = 1_000;       // data rate, bit/s

  // System clocks per data bit (20000).
  localparam int unsigned BIT_CYCLES = CLK_HZ / BIT_RATE;
  // Toggle interval of the reference divider: a 25 kHz square wave toggles
  // every 400 system clocks.
  localparam int unsigned REF_DIV = CLK_HZ / (2 * F_REF_HZ);
  // Counter demodulator: counting clock of 1 MHz (divide by 20), four
  // periods accumulated, threshold between 4*T_H (114) and 4*T_L (266) ticks.
  localparam int unsigned CNT_TICK_DIV  = 20;
  localparam int unsigned CNT_THRESHOLD = 186;
  // One-Shot: pulse as long as one f_H period (571 clocks), averaging window
  // of one f_L period (1333 clocks), threshold midway (952).
  localparam int unsigned OS_PULSE_LEN = CLK_HZ / F_H_HZ;
  localparam int unsigned OS_AVG_LEN   = CLK_HZ / F_L_HZ;
  localparam int unsigned OS_THRESHOLD = (OS_AVG_LEN + OS_PULSE_LEN) / 2;
  // PFD moving averages: 1000 taps, one tap every third clock.
  localparam int unsigned PFD_AVG_LEN   = 1000;
  localparam int unsigned PFD_AVG_DECIM = 3;
endpackage
