// GSM/DECT channel-selector filter with loadable coefficients: the second
// half of the partitioned last stage of the decimation chain.
//
// GSM and DECT need selector filters of similar order (about twice the UMTS
// order), so they share this one filter and the coefficient set of the
// active standard is written into its coefficient registers. Because the
// coefficients are variables, the constant-recoding trick of the half-band
// filter does not apply: every tap has a full radix-4 Booth partial-product
// generator (booth_r4_pp). As in the fixed filters, the structure is a
// polyphase decimate-by-2 direct form, and the partial products of all taps
// (COEF_W/2 per tap plus one vector of negation bits per tap) are reduced
// together in one Wallace tree (csa_tree) and one carry-propagate adder;
// the result is scaled by 2^-FRAC_W (floor) and saturated to OUT_W bits.
//
// Output:  y[m] = sum_k coef[k] * x[2m+1-k]   (x counted from 0 after reset).
//
// Coefficient port: on a clock edge with coef_we high, coefficient
// coef_addr is replaced by coef_data; the new value is used from the next
// output on. After reset the registers hold the GSM set (dec_pkg::GSM_COEF).
// Timing as in const_fir_dec2: output registered on the edge that accepts
// every second sample, out_valid pulses for one cycle; clk_req is high when
// a sample or a coefficient write arrives or out_valid must clear.
//
// The filter split and Booth/Wallace arithmetic follow the architecture; the
// write port, its reset contents, the tap count and widths are this
// design's own.
module gsm_dect_selector #(
  parameter int unsigned NTAPS  = dec_pkg::GD_TAPS,
  parameter int unsigned DATA_W = dec_pkg::DATA_W,
  parameter int unsigned COEF_W = dec_pkg::COEF_W,
  parameter int unsigned FRAC_W = dec_pkg::FRAC_W,
  parameter int unsigned OUT_W  = dec_pkg::DATA_W,
  parameter int unsigned AW     = $clog2(NTAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data,
  output logic                     clk_req
);

  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(NTAPS) + 1;
  localparam int unsigned NE    = (NTAPS + 1) / 2;
  localparam int unsigned NO    = NTAPS / 2;
  localparam int unsigned PPT   = COEF_W / 2 + 1;   // operands per tap
  localparam int unsigned NOPS  = NTAPS * PPT;

  logic signed [COEF_W-1:0] coef [NTAPS];

  logic                     phase;
  logic signed [DATA_W-1:0] hold;
  logic signed [DATA_W-1:0] ev [NE];
  logic signed [DATA_W-1:0] od [NO];
  logic signed [DATA_W-1:0] tap [NTAPS];
  logic                     fire;

  assign fire = in_valid & phase;

  always_comb begin
    for (int k = 0; k < NTAPS; k++) begin
      if (k % 2 == 0) tap[k] = (k == 0) ? in_data : ev[k/2 - 1];
      else            tap[k] = (k == 1) ? hold    : od[(k-1)/2 - 1];
    end
  end

  logic [NOPS-1:0][ACC_W-1:0] ops;
  logic [ACC_W-1:0]           t_sum, t_carry;
  logic signed [ACC_W-1:0]    acc, scaled;
  logic signed [OUT_W-1:0]    y;

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    logic [COEF_W/2-1:0][ACC_W-1:0] pp;
    logic [ACC_W-1:0]               nb;
    booth_r4_pp #(.DATA_W(DATA_W), .COEF_W(COEF_W), .W(ACC_W)) u_pp (
      .x       (tap[k]),
      .c       (coef[k]),
      .pp      (pp),
      .neg_bits(nb)
    );
    for (genvar j = 0; j < COEF_W / 2; j++) begin : g_op
      assign ops[k*PPT + j] = pp[j];
    end
    assign ops[k*PPT + PPT - 1] = nb;
  end

  csa_tree #(.N(NOPS), .W(ACC_W)) u_tree (
    .in   (ops),
    .sum  (t_sum),
    .carry(t_carry)
  );

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sd1 <<< (OUT_W - 1));

  always_comb begin
    acc    = t_sum + t_carry;
    scaled = acc >>> FRAC_W;
    if (scaled > MAXV)      y = MAXV[OUT_W-1:0];
    else if (scaled < MINV) y = MINV[OUT_W-1:0];
    else                    y = scaled[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++)
        coef[i] <= (i < dec_pkg::GD_TAPS) ? dec_pkg::GSM_COEF[i] : '0;
      phase     <= 1'b0;
      hold      <= '0;
      for (int i = 0; i < NE; i++) ev[i] <= '0;
      for (int i = 0; i < NO; i++) od[i] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (coef_we && coef_addr < AW'(NTAPS)) coef[coef_addr] <= coef_data;
      out_valid <= fire;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) hold <= in_data;
      end
      if (fire) begin
        ev[0] <= in_data;
        for (int i = 1; i < NE; i++) ev[i] <= ev[i-1];
        od[0] <= hold;
        for (int i = 1; i < NO; i++) od[i] <= od[i-1];
        out_data <= y;
      end
    end
  end

  assign clk_req = in_valid | out_valid | coef_we;

  initial begin
    assert (NTAPS >= 2) else $error("gsm_dect_selector: NTAPS must be at least 2");
    assert (COEF_W % 2 == 0) else $error("gsm_dect_selector: COEF_W must be even");
  end

endmodule
