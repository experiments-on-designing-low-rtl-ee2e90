// End-to-end testbench of decim_chain_top at its default parameters.
//
// A first-order sigma-delta loop in the testbench turns a sine wave into the
// +/-1 stream of a modulator. The chain is run through four segments,
// GSM -> UMTS -> DECT -> GSM, each of 64*K input cycles followed by a pause
// during which the standard is switched and, for DECT and GSM, the matching
// coefficient set is written into the GSM/DECT selector.
//
// Reference: the CIC as N cascaded moving sums of length M (output k taken
// at input k*M+M-1-N, scaled by 2^-(CIC_W-16)), the half-band and the
// selectors as direct convolutions with floor scaling and saturation; each
// selector sees only the half-band outputs of the segments of its standard.
// Every output value is compared in order, the spacing of outputs must be
// exactly 4*M input cycles, and the clock-gate enables are watched: the
// selector of the other standard must never be clocked, the comb and half-
// band clocks must run at the divided rates only. Each mechanism (mode
// switch, coefficient load, gating of each stage, decimation) is counted
// and must occur.
module tb_decim_chain_top;
  import tb_ref_pkg::*;
  import dec_pkg::*;

  localparam int IN_W = dec_pkg::IN_W, DW = dec_pkg::DATA_W;
  localparam int N = dec_pkg::CIC_N, M = dec_pkg::CIC_M;
  localparam int CIC_W = IN_W + N * $clog2(M);
  localparam int AW = $clog2(GD_TAPS);
  localparam int K = 40;                      // outputs per segment

  logic clk = 0, rst_n = 1, in_valid = 0, coef_we = 0;
  std_e std_sel = STD_GSM;
  logic signed [IN_W-1:0]   in_data = 0;
  logic [AW-1:0]            coef_addr = 0;
  logic signed [COEF_W-1:0] coef_data = 0;
  logic                     out_valid;
  logic signed [DW-1:0]     out_data;
  logic [3:0]               stage_clk_en;

  decim_chain_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // Mechanism counters.
  int n_switch = 0, n_coef_wr = 0, n_out = 0, n_rate_ok = 0;
  int n_comb_gated = 0, n_hb_gated = 0, n_umts_gated = 0, n_gd_gated = 0;
  int n_comb_on = 0, n_hb_on = 0;

  // Stimulus record and observed outputs.
  longint xs[$];
  longint got[$];
  std_e   seg_std[$];                         // standard of each segment
  int     seg_len[$];                         // inputs of each segment
  bit     running = 0;
  longint last_out_cyc = -1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor and clock-gate observation.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      got.push_back(longint'(out_data));
      n_out++;
      if (running && last_out_cyc >= 0) begin
        checks++;
        if (cyc - last_out_cyc != 4 * M) begin
          failures++;
          $display("output spacing %0d cycles, expected %0d", cyc - last_out_cyc, 4 * M);
        end else n_rate_ok++;
      end
      last_out_cyc = cyc;
    end
    if (running) begin
      if (!stage_clk_en[0]) n_comb_gated++; else n_comb_on++;
      if (!stage_clk_en[1]) n_hb_gated++;   else n_hb_on++;
      if (!stage_clk_en[2]) n_umts_gated++;
      if (!stage_clk_en[3]) n_gd_gated++;
      // The selector of another standard must stay unclocked.
      checks++;
      if (std_sel == STD_UMTS ? stage_clk_en[3] : stage_clk_en[2]) begin
        failures++;
        $display("idle selector clocked at cycle %0d", cyc);
      end
    end
  end

  // First-order sigma-delta loop producing +/-1 from a sine.
  real sd_acc = 0.0;
  int  sd_y = 1;
  function automatic int sd_next(longint n);
    real u;
    u = 0.6 * $sin(2.0 * 3.14159265358979 * real'(n) / 700.0);
    sd_acc = sd_acc + u - real'(sd_y);
    sd_y = (sd_acc >= 0.0) ? 1 : -1;
    return sd_y;
  endfunction

  task automatic run_segment(std_e s, int len);
    seg_std.push_back(s);
    seg_len.push_back(len);
    last_out_cyc = -1;
    running = 1;
    for (int i = 0; i < len; i++) begin
      in_valid = 1;
      in_data  = IN_W'(sd_next(xs.size()));
      @(posedge clk); #1;
      xs.push_back(longint'(in_data));
    end
    in_valid = 0;
    running = 0;
    repeat (20) @(posedge clk);
    #1;
  endtask

  task automatic load_coefs(std_e s);
    for (int i = 0; i < GD_TAPS; i++) begin
      coef_we   = 1;
      coef_addr = AW'(i);
      coef_data = (s == STD_DECT) ? DECT_COEF[i] : GSM_COEF[i];
      @(posedge clk); #1;
      n_coef_wr++;
    end
    coef_we = 0;
  endtask

  task automatic switch_to(std_e s);
    if (s != std_sel) n_switch++;
    std_sel = s;
    @(posedge clk); #1;
  endtask

  // Reference model of the whole chain.
  task automatic check_all();
    longint box[$], cic[$], hb[$], um_in[$], gd_in[$], expv[$];
    int hbc[$], umc[$], gdc[$];
    int seg, seg_end_hb;
    foreach (HB_COEF[i])   hbc.push_back(int'(HB_COEF[i]));
    foreach (UMTS_COEF[i]) umc.push_back(int'(UMTS_COEF[i]));
    box = xs;
    for (int s = 0; s < N; s++) moving_sum(box, M);
    for (int k = 0; k * M + M - 1 < xs.size(); k++) begin
      int idx;
      idx = k * M + M - 1 - N;
      cic.push_back(idx >= 0 ? (wrap(box[idx], CIC_W) >>> (CIC_W - DW)) : 0);
    end
    for (int m = 0; 2 * m + 1 < cic.size(); m++)
      hb.push_back(scale_sat(fir_at(cic, hbc, 2 * m + 1), FRAC_W, DW));
    // Distribute half-band outputs over the segments (each segment is a
    // whole number of 4M-input frames, i.e. len/(2M) half-band outputs).
    seg = 0;
    seg_end_hb = seg_len[0] / (2 * M);
    for (int m = 0; m < hb.size(); m++) begin
      while (m >= seg_end_hb) begin seg++; seg_end_hb += seg_len[seg] / (2 * M); end
      if (seg_std[seg] == STD_UMTS) begin
        um_in.push_back(hb[m]);
        if (um_in.size() % 2 == 0)
          expv.push_back(scale_sat(fir_at(um_in, umc, um_in.size() - 1), FRAC_W, DW));
      end else begin
        gdc = {};
        if (seg_std[seg] == STD_DECT) foreach (DECT_COEF[i]) gdc.push_back(int'(DECT_COEF[i]));
        else                          foreach (GSM_COEF[i])  gdc.push_back(int'(GSM_COEF[i]));
        gd_in.push_back(hb[m]);
        if (gd_in.size() % 2 == 0)
          expv.push_back(scale_sat(fir_at(gd_in, gdc, gd_in.size() - 1), FRAC_W, DW));
      end
    end
    checks++;
    if (got.size() != expv.size()) begin
      failures++;
      $display("got %0d outputs, expected %0d", got.size(), expv.size());
    end
    for (int i = 0; i < got.size() && i < expv.size(); i++) begin
      checks++;
      if (got[i] != expv[i]) begin
        failures++;
        if (failures < 10) $display("output %0d: got %0d expected %0d", i, got[i], expv[i]);
      end
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("%-28s %0d", what, count);
    if (count == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    // A real falling edge: stages whose clock is gated off during reset
    // are reset by the asynchronous reset alone.
    #2 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_segment(STD_GSM, 4 * M * K);
    switch_to(STD_UMTS);
    run_segment(STD_UMTS, 4 * M * K);
    load_coefs(STD_DECT);
    switch_to(STD_DECT);
    run_segment(STD_DECT, 4 * M * K);
    load_coefs(STD_GSM);
    switch_to(STD_GSM);
    run_segment(STD_GSM, 4 * M * K / 2);
    check_all();
    need("outputs", n_out);
    need("outputs at the 4M rate", n_rate_ok);
    need("standard switches", n_switch);
    need("coefficient writes", n_coef_wr);
    need("comb clock gated cycles", n_comb_gated);
    need("half-band gated cycles", n_hb_gated);
    need("UMTS selector gated cycles", n_umts_gated);
    need("GSM/DECT selector gated", n_gd_gated);
    // Divided clocks: the comb is clocked on 2 of every M cycles (sample,
    // then clearing out_valid), the half-band on 3 of every 2M (two samples,
    // one output to clear); segment ends allow a few cycles of slack.
    checks++;
    if (n_comb_on * M < 2 * (n_comb_on + n_comb_gated) - 4 * M * 4 ||
        n_comb_on * M > 2 * (n_comb_on + n_comb_gated) + 4 * M * 4 ||
        n_hb_on * 2 * M < 3 * (n_hb_on + n_hb_gated) - 8 * M * 4 ||
        n_hb_on * 2 * M > 3 * (n_hb_on + n_hb_gated) + 8 * M * 4) begin
      failures++;
      $display("comb/half-band clock duty %0d/%0d, %0d/%0d",
               n_comb_on, n_comb_on + n_comb_gated, n_hb_on, n_hb_on + n_hb_gated);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
