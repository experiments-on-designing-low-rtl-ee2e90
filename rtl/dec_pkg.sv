// Shared types and constants of the multi-standard decimation chain.
//
// The chain is a cascade of three decimators fed by a 4th-order sigma-delta
// modulator: a CIC (integrator-comb) filter decimating by M, a half-band
// filter decimating by 2 and a channel-selector FIR decimating by 2. The
// selector is split in two filters: one with fixed coefficients for UMTS and
// one with loadable coefficients for GSM and DECT. This package holds the
// standard encoding, the default word widths and the coefficient tables.
//
// Coefficients are not published with the architecture; the tables below are
// this design's own. They are Hamming-windowed sinc filters, normalised to a
// DC gain of one and rounded to Q1.15 (value * 2^15):
//   h[n] = round(2^15 * w[n] * 2fc sinc(2fc (n-(L-1)/2)) / sum(...)),
//   w[n] = 0.54 - 0.46 cos(2 pi n/(L-1)),
// with fc relative to the filter's input rate:
//   half-band L=11, fc=0.25 (odd-offset taps forced to 0, centre to 0.5),
//   UMTS L=17 fc=0.20, GSM L=33 fc=0.08, DECT L=31 fc=0.11 (padded with a
//   zero at each end to fill the 33-tap GSM/DECT filter).
package dec_pkg;

  // Standard handled by the receiver.
  typedef enum logic [1:0] {
    STD_GSM  = 2'd0,
    STD_DECT = 2'd1,
    STD_UMTS = 2'd2
  } std_e;

  // Default word widths.
  localparam int unsigned IN_W   = 2;   // sigma-delta output, signed (+1/-1)
  localparam int unsigned DATA_W = 16;  // inter-stage sample width
  localparam int unsigned COEF_W = 16;  // Q1.15 coefficients
  localparam int unsigned FRAC_W = 15;  // fraction bits of the coefficients

  // CIC defaults.
  localparam int unsigned CIC_N = 5;    // order = modulator order + 1
  localparam int unsigned CIC_M = 16;   // decimation factor

  // Filter lengths.
  localparam int unsigned HB_TAPS   = 11;
  localparam int unsigned UMTS_TAPS = 17;
  localparam int unsigned GD_TAPS   = 33;  // GSM/DECT programmable filter

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t HB_COEF [HB_TAPS] = '{
    16'sd166, 16'sd0, -16'sd1374, 16'sd0, 16'sd9453, 16'sd16384,
    16'sd9453, 16'sd0, -16'sd1374, 16'sd0, 16'sd166 };

  localparam coef_t UMTS_COEF [UMTS_TAPS] = '{
    -16'sd61, 16'sd101, 16'sd355, 16'sd0, -16'sd1340, -16'sd1464, 16'sd2655,
    16'sd9580, 16'sd13118, 16'sd9580, 16'sd2655, -16'sd1464, -16'sd1340,
    16'sd0, 16'sd355, 16'sd101, -16'sd61 };

  localparam coef_t GSM_COEF [GD_TAPS] = '{
    16'sd51, 16'sd59, 16'sd58, 16'sd31, -16'sd46, -16'sd184, -16'sd360,
    -16'sd511, -16'sd541, -16'sd344, 16'sd156, 16'sd973, 16'sd2036,
    16'sd3191, 16'sd4237, 16'sd4966, 16'sd5227, 16'sd4966, 16'sd4237,
    16'sd3191, 16'sd2036, 16'sd973, 16'sd156, -16'sd344, -16'sd541,
    -16'sd511, -16'sd360, -16'sd184, -16'sd46, 16'sd31, 16'sd58, 16'sd59,
    16'sd51 };

  localparam coef_t DECT_COEF [GD_TAPS] = '{
    16'sd0, -16'sd45, -16'sd17, 16'sd41, 16'sd132, 16'sd213, 16'sd190,
    -16'sd29, -16'sd439, -16'sd870, -16'sd1002, -16'sd497, 16'sd814,
    16'sd2780, 16'sd4921, 16'sd6584, 16'sd7212, 16'sd6584, 16'sd4921,
    16'sd2780, 16'sd814, -16'sd497, -16'sd1002, -16'sd870, -16'sd439,
    -16'sd29, 16'sd190, 16'sd213, 16'sd132, 16'sd41, -16'sd17, -16'sd45,
    16'sd0 };

endpackage
