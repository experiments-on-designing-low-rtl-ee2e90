// Multi-standard (GSM / DECT / UMTS) low-power decimation filter chain.
//
// The chain takes the output of a 4th-order sigma-delta modulator at the
// oversampled rate fs and brings it down to the channel rate in three
// decimating stages:
//   1. CIC filter, decimation by M: integrators at fs (cic_integrator),
//      combs at fs/M (cic_comb);
//   2. half-band filter, decimation by 2, fixed coefficients shared by all
//      standards (halfband_filter), fs/M in, fs/(2M) out;
//   3. channel-selector FIR, decimation by 2, partitioned into two filters
//      of which only the one of the selected standard runs: a fixed-
//      coefficient UMTS filter (umts_selector) and a GSM/DECT filter with
//      loadable coefficients (gsm_dect_selector); fs/(2M) in, fs/(4M) out.
//
// Clocking (low-power scheme). Only the integrators see the free-running
// clock. Every later stage gets its own gated clock from a clk_gate cell
// whose enable is the stage's clk_req: the stage is clocked only on the
// cycles on which it takes a sample, clears its out_valid or (GSM/DECT
// filter) takes a coefficient write. Since the samples arrive at the rates
// set by the CIC's modulo-M counter and the 2:1 commutators, the comb gets a
// clock divided by M, the half-band filter one divided by M as well (its
// branches and output advance every 2M), and the selector one divided by 2M,
// all derived from the integrator's sample counter. The selector filter of
// the other standard(s) receives no samples and its clock stays off.
//
// Interface. in_valid/in_data: modulator samples (normally in_valid=1 on
// every cycle). std_sel: active standard (dec_pkg::std_e); change it only
// between bursts, the filters keep their state. coef_*: write port of the
// GSM/DECT coefficient registers (reset value: GSM set); load the DECT set
// before selecting DECT. out_valid/out_data: channel samples at fs/(4M),
// out_valid pulses one cycle per sample.
//
// The stage sequence, rates, selector partitioning, clock gating and
// Booth/Wallace arithmetic follow the architecture; widths, coefficient
// sets, the CIC order and M, the gating enables and the coefficient port
// are this design's own.
module decim_chain_top #(
  parameter int unsigned IN_W   = dec_pkg::IN_W,
  parameter int unsigned DATA_W = dec_pkg::DATA_W,
  parameter int unsigned CIC_N  = dec_pkg::CIC_N,
  parameter int unsigned CIC_M  = dec_pkg::CIC_M,
  parameter int unsigned GD_AW  = $clog2(dec_pkg::GD_TAPS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  dec_pkg::std_e                 std_sel,
  input  logic                          in_valid,
  input  logic signed [IN_W-1:0]        in_data,
  input  logic                          coef_we,
  input  logic [GD_AW-1:0]              coef_addr,
  input  logic signed [dec_pkg::COEF_W-1:0] coef_data,
  output logic                          out_valid,
  output logic signed [DATA_W-1:0]      out_data,
  // Gated-clock enables, brought out to observe the gating.
  output logic [3:0]                    stage_clk_en
);

  localparam int unsigned CIC_W = IN_W + CIC_N * $clog2(CIC_M);

  // CIC integrators, free-running clock ---------------------------------
  logic                    int_valid;
  logic signed [CIC_W-1:0] int_data;

  cic_integrator #(.IN_W(IN_W), .N(CIC_N), .M(CIC_M), .ACC_W(CIC_W)) u_int (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(int_valid), .out_data(int_data)
  );

  // CIC combs, clock divided by M --------------------------------------
  logic                     comb_clk, comb_req, comb_valid;
  logic signed [DATA_W-1:0] comb_data;

  clk_gate u_cg_comb (.clk, .en(comb_req), .gclk(comb_clk));

  cic_comb #(.IN_W(IN_W), .N(CIC_N), .M(CIC_M), .ACC_W(CIC_W), .OUT_W(DATA_W)) u_comb (
    .clk(comb_clk), .rst_n, .in_valid(int_valid), .in_data(int_data),
    .out_valid(comb_valid), .out_data(comb_data), .clk_req(comb_req)
  );

  // Half-band filter ----------------------------------------------------
  logic                     hb_clk, hb_req, hb_valid;
  logic signed [DATA_W-1:0] hb_data;

  clk_gate u_cg_hb (.clk, .en(hb_req), .gclk(hb_clk));

  halfband_filter #(.DATA_W(DATA_W)) u_hb (
    .clk(hb_clk), .rst_n, .in_valid(comb_valid), .in_data(comb_data),
    .out_valid(hb_valid), .out_data(hb_data), .clk_req(hb_req)
  );

  // Partitioned channel selector ------------------------------------------
  logic sel_umts;
  assign sel_umts = (std_sel == dec_pkg::STD_UMTS);

  logic                     um_clk, um_req, um_valid;
  logic signed [DATA_W-1:0] um_data;

  clk_gate u_cg_umts (.clk, .en(um_req), .gclk(um_clk));

  umts_selector #(.DATA_W(DATA_W)) u_umts (
    .clk(um_clk), .rst_n, .in_valid(hb_valid & sel_umts), .in_data(hb_data),
    .out_valid(um_valid), .out_data(um_data), .clk_req(um_req)
  );

  logic                     gd_clk, gd_req, gd_valid;
  logic signed [DATA_W-1:0] gd_data;

  clk_gate u_cg_gd (.clk, .en(gd_req), .gclk(gd_clk));

  gsm_dect_selector #(
    .NTAPS(dec_pkg::GD_TAPS), .DATA_W(DATA_W), .COEF_W(dec_pkg::COEF_W),
    .FRAC_W(dec_pkg::FRAC_W), .OUT_W(DATA_W), .AW(GD_AW)
  ) u_gd (
    .clk(gd_clk), .rst_n, .in_valid(hb_valid & ~sel_umts), .in_data(hb_data),
    .coef_we, .coef_addr, .coef_data,
    .out_valid(gd_valid), .out_data(gd_data), .clk_req(gd_req)
  );

  // Output select -----------------------------------------------------------
  always_comb begin
    out_valid = um_valid | gd_valid;
    out_data  = um_valid ? um_data : gd_data;
  end

  assign stage_clk_en = {gd_req, um_req, hb_req, comb_req};

endmodule
