// Half-band decimate-by-2 filter, second stage of the decimation chain.
//
// One coefficient set serves all three standards, so it is fixed at
// elaboration and implemented by const_fir_dec2: polyphase form, the
// odd-offset taps of the half-band response are zero and produce no
// hardware, the remaining constants use mixed radix-2/radix-4 Booth
// recoding, and all partial products meet in one Wallace tree followed by
// a carry-propagate adder. Input at fs/M, output at fs/(2M).
//
// Interface and timing are those of const_fir_dec2: out_data is registered
// on the edge that accepts every second input sample, out_valid pulses for
// one cycle, clk_req tells a clock gate when the stage needs its clock.
//
// The 11-tap coefficient set (dec_pkg::HB_COEF) is this design's own.
module halfband_filter #(
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
    .NTAPS (dec_pkg::HB_TAPS),
    .DATA_W(DATA_W),
    .COEF_W(dec_pkg::COEF_W),
    .FRAC_W(dec_pkg::FRAC_W),
    .OUT_W (DATA_W),
    .COEFS (dec_pkg::HB_COEF)
  ) u_fir (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .clk_req
  );

endmodule
