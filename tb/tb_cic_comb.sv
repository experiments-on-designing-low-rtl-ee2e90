// Testbench of cic_comb: random ACC_W-bit input words with gaps; checks that
// out_valid follows each accepted sample by one cycle, that the output is
// the N-th difference sum_i (-1)^i C(N,i) u[k-i] (mod 2^ACC_W) shifted right
// by ACC_W-OUT_W, and that clk_req is low once the block is idle.
module tb_cic_comb;
  import tb_ref_pkg::*;

  localparam int IN_W = 2, N = 5, M = 16, OUT_W = 16;
  localparam int ACC_W = IN_W + N * $clog2(M);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [ACC_W-1:0] in_data = 0;
  logic                    out_valid, clk_req;
  logic signed [OUT_W-1:0] out_data;

  cic_comb #(.IN_W(IN_W), .N(N), .M(M), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nout = 0, nidle = 0;
  longint us[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      bit was_valid;
      in_valid = ($urandom_range(0, 3) == 0);
      in_data  = ACC_W'($urandom);
      @(posedge clk); #1;
      was_valid = in_valid;
      if (in_valid) us.push_back(longint'(in_data));
      checks++;
      if (out_valid !== was_valid) begin
        failures++;
        $display("cycle %0d: out_valid=%0b expected %0b", cyc, out_valid, was_valid);
      end
      if (was_valid) begin
        longint d, e;
        int n;
        n = us.size() - 1;
        d = 0;
        for (int i = 0; i <= N; i++)
          if (n - i >= 0) d += ((i % 2) ? -1 : 1) * binom(N, i) * us[n - i];
        e = wrap(d, ACC_W) >>> (ACC_W - OUT_W);
        checks++;
        nout++;
        if (out_data != e) begin
          failures++;
          $display("output %0d: got %0d expected %0d", nout, out_data, e);
        end
      end
      // With no sample now and none in the previous cycle, the clock may stop.
      in_valid = 1'b0;
      #1;
      if (!was_valid) begin
        checks++;
        nidle++;
        if (clk_req !== 1'b0) begin failures++; $display("clk_req high while idle"); end
      end else begin
        checks++;
        if (clk_req !== 1'b1) begin failures++; $display("clk_req low after a sample"); end
      end
    end
    checks++;
    if (nout < 500 || nidle < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
