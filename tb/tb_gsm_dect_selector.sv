// Testbench of gsm_dect_selector: first runs on the reset coefficients (the
// GSM set), then loads the DECT set through the coefficient port, then
// random 16-bit coefficients (including -32768 and 32767, the Booth corner
// cases) while samples keep flowing with random gaps. Each output is checked
// against floor(sum_k c[k] x[2m+1-k] / 2^15) saturated to 16 bits, using a
// mirror of the coefficients written so far; out_valid must follow every
// second accepted sample by one cycle.
module tb_gsm_dect_selector;
  import tb_ref_pkg::*;

  localparam int DW = 16, NT = dec_pkg::GD_TAPS, AW = $clog2(NT);

  logic clk = 0, rst_n = 0, in_valid = 0, coef_we = 0;
  logic signed [DW-1:0] in_data = 0;
  logic [AW-1:0]        coef_addr = 0;
  logic signed [15:0]   coef_data = 0;
  logic                 out_valid, clk_req;
  logic signed [DW-1:0] out_data;

  gsm_dect_selector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nout = 0, nsat = 0, nwr = 0;
  longint xs[$];
  int     coefs[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock cycle: optionally a coefficient write (never together with a
  // sample), otherwise a sample with probability 3/4.
  task automatic step(int cyc, bit do_write, int waddr, int wdata);
    coef_we   = do_write;
    coef_addr = AW'(waddr);
    coef_data = 16'(wdata);
    in_valid  = !do_write && ($urandom_range(0, 3) != 0);
    if (cyc % 1500 < 40)       in_data = (cyc % 2) ? 16'sh7fff : 16'sh8000;
    else                       in_data = DW'($urandom);
    @(posedge clk); #1;
    if (do_write) begin coefs[waddr] = wdata; nwr++; end
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
    coef_we = 0;
  endtask

  initial begin
    foreach (dec_pkg::GSM_COEF[i]) coefs.push_back(int'(dec_pkg::GSM_COEF[i]));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 1500; cyc++) step(cyc, 0, 0, 0);           // GSM set
    for (int i = 0; i < NT; i++) step(0, 1, i, int'(dec_pkg::DECT_COEF[i]));
    for (int cyc = 0; cyc < 1500; cyc++) step(cyc, 0, 0, 0);           // DECT set
    for (int cyc = 0; cyc < 3000; cyc++) begin                         // random sets
      if ($urandom_range(0, 9) == 0) begin
        int a, d;
        a = $urandom_range(0, NT - 1);
        case ($urandom_range(0, 3))
          0: d = -32768;
          1: d = 32767;
          default: d = int'(16'($urandom));
        endcase
        if (d > 32767) d -= 65536;
        step(cyc, 1, a, d);
      end else step(cyc, 0, 0, 0);
    end
    checks++;
    if (nout < 1500) failures++;
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("outputs %0d, saturated %0d, coefficient writes %0d", nout, nsat, nwr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
