// Testbench of halfband_filter: drives random samples with random gaps, a
// full-scale constant run that drives the output into saturation, and an
// alternating full-scale run; checks that out_valid follows every second
// accepted sample by one cycle (decimation by 2) and that each output is
// floor(sum_k h[k] x[2m+1-k] / 2^15), saturated to 16 bits, computed here
// by direct convolution with the coefficients of the half-band filter.
module tb_halfband_filter;
  import tb_ref_pkg::*;

  localparam int DW = 16;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] in_data = 0;
  logic                 out_valid, clk_req;
  logic signed [DW-1:0] out_data;

  halfband_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nout = 0, nsat = 0;
  longint xs[$];
  int     coefs[$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (dec_pkg::HB_COEF[i]) coefs.push_back(int'(dec_pkg::HB_COEF[i]));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      if (cyc >= 2000 && cyc < 2100)      in_data = 16'sh7fff;
      else if (cyc >= 2100 && cyc < 2200) in_data = 16'sh8000;
      else if (cyc >= 3000 && cyc < 3100) in_data = (cyc % 2) ? 16'sh7fff : 16'sh8000;
      else                                in_data = DW'($urandom);
      @(posedge clk); #1;
      if (in_valid) xs.push_back(longint'(in_data));
      begin
        bit exp_v;
        exp_v = in_valid && (xs.size() % 2 == 0);
        checks++;
        if (out_valid !== exp_v) begin
          failures++;
          $display("cycle %0d: out_valid=%0b expected %0b", cyc, out_valid, exp_v);
        end
        if (exp_v) begin
          longint full, e;
          full = fir_at(xs, coefs, xs.size() - 1);
          e = scale_sat(full, 15, DW);
          if (e != (full >>> 15)) nsat++;
          checks++;
          nout++;
          if (out_data != e) begin
            failures++;
            $display("output %0d: got %0d expected %0d", nout, out_data, e);
          end
        end
      end
    end
    checks++;
    if (nout < 1000) failures++;
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("outputs %0d, saturated %0d", nout, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
