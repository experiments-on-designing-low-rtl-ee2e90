// Radix-4 (modified) Booth partial-product generator for one signed
// multiplication x * c with a run-time coefficient c.
//
// The COEF_W-bit coefficient is scanned in overlapping bit triplets
// (c[2j+1], c[2j], c[2j-1]), c[-1] = 0, giving one digit in {-2,-1,0,1,2}
// per bit pair and thus COEF_W/2 partial products instead of COEF_W. For
// digit j the product is 0, x or 2x, sign-extended to W bits and shifted
// left by 2j; for a negative digit the multiple is bit-inverted before the
// shift, so the low 2j bits stay zero. The +1 that
// completes each two's complement negation is returned in neg_bits at
// position 2j, so x*c = sum(pp) + neg_bits (mod 2^W). Nothing is added here:
// the caller reduces the partial products in a compressor tree.
//
// Purely combinational. Radix-4 modified Booth follows the architecture;
// full sign extension of every product is this design's choice.
module booth_r4_pp #(
  parameter int unsigned DATA_W = dec_pkg::DATA_W,
  parameter int unsigned COEF_W = dec_pkg::COEF_W,
  parameter int unsigned W      = DATA_W + COEF_W
) (
  input  logic signed [DATA_W-1:0]     x,
  input  logic signed [COEF_W-1:0]     c,
  output logic [COEF_W/2-1:0][W-1:0]   pp,
  output logic [W-1:0]                 neg_bits
);

  logic [W-1:0] x1, x2;
  assign x1 = W'(x);
  assign x2 = W'(x) << 1;

  always_comb begin
    neg_bits = '0;
    for (int j = 0; j < COEF_W / 2; j++) begin
      logic b2, b1, b0;
      logic [W-1:0] mag;
      logic neg;
      b2 = c[2*j+1];
      b1 = c[2*j];
      b0 = (j == 0) ? 1'b0 : c[2*j-1];
      unique case ({b2, b1, b0})
        3'b001, 3'b010, 3'b101, 3'b110: mag = x1;
        3'b011, 3'b100:                 mag = x2;
        default:                        mag = '0;
      endcase
      neg   = b2 & ~(b1 & b0);
      pp[j] = (neg ? ~mag : mag) << (2*j);
      neg_bits[2*j] = neg;
    end
  end

endmodule
