// Testbench of cic_integrator: random +/-1 input with gaps; checks that an
// output appears exactly on every M-th accepted sample and that it equals
// the N-fold running sum of the input, delayed by N samples, modulo 2^ACC_W.
module tb_cic_integrator;
  import tb_ref_pkg::*;

  localparam int IN_W = 2, N = 5, M = 16;
  localparam int ACC_W = IN_W + N * $clog2(M);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0]  in_data = 0;
  logic                    out_valid;
  logic signed [ACC_W-1:0] out_data;

  cic_integrator #(.IN_W(IN_W), .N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nout = 0;
  longint xs[$];

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
    for (int cyc = 0; cyc < 3000; cyc++) begin
      in_valid = ($urandom_range(0, 7) != 0);
      in_data  = ($urandom_range(0, 2) != 0) ? 2'sd1 : -2'sd1;
      @(posedge clk); #1;
      if (in_valid) xs.push_back(longint'(in_data));
      begin
        bit exp_v;
        exp_v = in_valid && (xs.size() % M == 0);
        checks++;
        if (out_valid !== exp_v) begin
          failures++;
          $display("cycle %0d: out_valid=%0b expected %0b", cyc, out_valid, exp_v);
        end
        if (exp_v) begin
          longint v[$];
          int idx;
          longint e;
          v = xs;
          for (int s = 0; s < N; s++) begin          // N-fold running sum
            longint run;
            run = 0;
            foreach (v[i]) begin run += v[i]; v[i] = run; end
          end
          idx = xs.size() - 1 - N;
          e = (idx >= 0) ? wrap(v[idx], ACC_W) : 0;
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
    if (nout < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
