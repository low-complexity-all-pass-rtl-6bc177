// ecg_dec_pkg: shared constants of the ECG sigma-delta decimation chain.
//
// The chain decimates a 1-bit sigma-delta stream at 51.2 kHz by 128 to 400 Hz
// in four stages: a 4th-order slink (CIC) 32:1, two 10th-order double
// polyphase all-pass halfband stages 2:1 each, and a first-order compensation
// filter 1:1. Stage orders, rates and ratios follow the published design.
//
// Word formats (own choice; no word lengths are published):
//   * slink output: SLINK_W-bit two's complement, value = code / 2^20, so the
//     1/32^4 gain of the slink is absorbed into the binary point.
//   * everything after the slink: DATA_W-bit two's complement with DATA_FRAC
//     fractional bits (range +/-8), giving 2 guard fraction bits against the
//     truncation in the shift-and-add coefficients and 3 integer headroom bits
//     for the all-pass internal peaks.
//
// Coefficients (own choice; the published design only says they are powers of
// two or shift-and-add terms): each is written as 2^-SH1 + SIGN2 * 2^-SH2,
// SIGN2 = 0 dropping the second term.
//   alpha1 = 2^-3            = 0.125
//   alpha2 = 2^-1 + 2^-4     = 0.5625
//   alphac = 2^-5 - 2^-8     = 0.02734375
// alpha1/alpha2 give a single 5th-order halfband with a stopband of about
// -66 dB beyond 0.4 fs (about -132 dB for the 10th-order cascade), and alphac
// keeps the slink+compensation response within about 0.02 dB up to 0.3 of the
// 400 Hz output rate.
package ecg_dec_pkg;

  // slink (CIC) stage
  localparam int unsigned SLINK_ORDER = 4;
  localparam int unsigned SLINK_R     = 32;
  // bipolar +/-1 input needs 2 bits; the gain R^ORDER = 2^20 adds 20 bits
  localparam int unsigned SLINK_W     = 2 + SLINK_ORDER * $clog2(SLINK_R);
  localparam int unsigned SLINK_FRAC  = SLINK_ORDER * $clog2(SLINK_R);

  // filter datapath after the slink
  localparam int unsigned DATA_W    = 26;
  localparam int unsigned DATA_FRAC = 22;

  // halfband all-pass coefficients, alpha = 2^-SH1 + SIGN2 * 2^-SH2
  localparam int unsigned A1_SH1   = 3;
  localparam int unsigned A1_SH2   = 1;
  localparam int          A1_SIGN2 = 0;
  localparam int unsigned A2_SH1   = 1;
  localparam int unsigned A2_SH2   = 4;
  localparam int          A2_SIGN2 = 1;

  // compensation coefficient
  localparam int unsigned AC_SH1   = 5;
  localparam int unsigned AC_SH2   = 8;
  localparam int          AC_SIGN2 = -1;

endpackage
