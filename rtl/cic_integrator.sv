// CIC integrator section and down-sampler (first half of the CIC decimator).
//
// N cascaded integrators run at the full modulator rate fs and accumulate the
// sigma-delta samples. A modulo-M sample counter divides the rate: every M-th
// input the last integrator is copied to the output register and out_valid
// pulses for one cycle, so the comb section behind it runs at fs/M. The
// counter is the source of the divided rates used by the rest of the chain.
//
// Arithmetic is two's complement and wraps (Hogenauer): the register width
// ACC_W = IN_W + N*log2(M) is enough for the exact comb output, so
// intermediate overflow in the integrators cancels in the comb section.
// The integrators are pipelined (integrator i adds the registered value of
// integrator i-1), which only adds a fixed delay of N-1 input samples.
//
// Timing: an output is produced on the edge that accepts input number
// k*M + M-1 (counting from 0 after reset); it holds the integrator state
// reached after input k*M + M-1 - N, i.e. the CIC response is delayed by N
// input samples in total.
//
// The integrator/comb split, the fs and fs/M rates and the decimation
// follow the architecture; the order N=5 (modulator order + 1), M=16, the
// widths and the asynchronous active-low reset are this design's choices.
module cic_integrator #(
  parameter int unsigned IN_W  = dec_pkg::IN_W,
  parameter int unsigned N     = dec_pkg::CIC_N,
  parameter int unsigned M     = dec_pkg::CIC_M,
  parameter int unsigned ACC_W = IN_W + N * $clog2(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_data
);

  logic signed [ACC_W-1:0]  acc [N];
  logic [$clog2(M)-1:0]     cnt;
  logic                     last;

  assign last = (cnt == ($clog2(M))'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) acc[i] <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        acc[0] <= acc[0] + ACC_W'(in_data);
        for (int i = 1; i < N; i++) acc[i] <= acc[i] + acc[i-1];
        cnt <= last ? '0 : cnt + 1'b1;
        if (last) begin
          out_data  <= acc[N-1];
          out_valid <= 1'b1;
        end
      end
    end
  end

  initial begin
    assert (M >= 2 && (M & (M - 1)) == 0)
      else $error("cic_integrator: M must be a power of two");
  end

endmodule
