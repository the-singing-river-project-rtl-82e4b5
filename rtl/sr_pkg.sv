// sr_pkg: constants shared by the three subsystems of the Singing River
// instrument (hand-tracking vision, fundamental frequency estimator and
// pitch shifter). All logic runs from one 10 MHz clock; audio is handled at
// 40 kHz, so one audio sample lasts 250 clocks. Pitch values travel between
// subsystems as 9-bit frequencies (F0) and 8-bit hand coordinates over a
// small serial link. The clock and sample rates, word widths and the
// 40-500 Hz frequency range come from the original design; nothing here is
// invented beyond grouping them.
package sr_pkg;
  localparam int unsigned CLK_HZ   = 10_000_000;
  localparam int unsigned FS_HZ    = 40_000;
  localparam int unsigned SAMPLE_DIV = CLK_HZ / FS_HZ;  // 250 clocks per sample
  localparam int unsigned F_MIN_HZ = 40;
  localparam int unsigned F_MAX_HZ = 500;
endpackage
