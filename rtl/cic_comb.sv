// CIC comb (differentiator) section, second half of the CIC decimator.
//
// Runs at the decimated rate fs/M: each sample accepted with in_valid passes
// through N cascaded differentiators y = x - x[-1] (one delay register per
// stage, combinational through the N subtracters) and the result is scaled
// to the inter-stage sample width by dropping the SHIFT = ACC_W - OUT_W low
// bits (arithmetic shift, i.e. floor). With M^N = 2^(ACC_W-IN_W) the gain of
// the whole CIC becomes 2^(OUT_W-IN_W), so a full-scale +/-1 input gives
// +/-2^(OUT_W-2).
//
// Timing: out_data/out_valid are registered on the edge that accepts the
// input, out_valid pulses for one cycle. clk_req is high on every cycle on
// which a flip-flop of this block can change; a clock gate may stop the
// clock whenever it is low (the comb then runs on a clock divided from the
// integrator's sample counter).
//
// The comb structure and its fs/M rate follow the architecture; the widths,
// the truncating scaling and the reset are this design's choices.
module cic_comb #(
  parameter int unsigned IN_W  = dec_pkg::IN_W,
  parameter int unsigned N     = dec_pkg::CIC_N,
  parameter int unsigned M     = dec_pkg::CIC_M,
  parameter int unsigned ACC_W = IN_W + N * $clog2(M),
  parameter int unsigned OUT_W = dec_pkg::DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    clk_req
);

  localparam int unsigned SHIFT = ACC_W - OUT_W;

  logic signed [ACC_W-1:0] dly  [N];
  logic signed [ACC_W-1:0] diff [N+1];

  always_comb begin
    diff[0] = in_data;
    for (int i = 0; i < N; i++) diff[i+1] = diff[i] - dly[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) dly[i] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < N; i++) dly[i] <= diff[i];
        out_data <= OUT_W'(diff[N] >>> SHIFT);
      end
    end
  end

  assign clk_req = in_valid | out_valid;

  initial begin
    assert (ACC_W >= OUT_W) else $error("cic_comb: ACC_W < OUT_W");
  end

endmodule
