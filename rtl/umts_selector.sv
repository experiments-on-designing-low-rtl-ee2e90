// UMTS channel-selector filter, one of the two halves of the partitioned
// last stage of the decimation chain.
//
// The UMTS selector has fixed coefficients, so, like the half-band filter,
// it is built from const_fir_dec2: polyphase decimation by 2, mixed
// radix-2/radix-4 Booth recoding of each constant, one Wallace tree for the
// partial products of all taps and a final carry-propagate adder. Its order
// is about half that of the GSM and DECT selectors. Input at fs/(2M),
// output at fs/(4M).
//
// Interface and timing are those of const_fir_dec2. When another standard
// is selected the stage receives no samples, clk_req stays low and its
// clock can be gated off entirely.
//
// The 17-tap coefficient set (dec_pkg::UMTS_COEF) is this design's own.
module umts_selector #(
  parameter int unsigned DATA_W = dec_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data,
  output logic                     clk_req
);

  const_fir_dec2 #(
    .NTAPS (dec_pkg::UMTS_TAPS),
    .DATA_W(DATA_W),
    .COEF_W(dec_pkg::COEF_W),
    .FRAC_W(dec_pkg::FRAC_W),
    .OUT_W (DATA_W),
    .COEFS (dec_pkg::UMTS_COEF)
  ) u_fir (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .clk_req
  );

endmodule
