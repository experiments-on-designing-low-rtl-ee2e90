// Wallace tree of carry-save (3:2) compressors.
//
// Reduces N operands of W bits to two vectors, sum and carry, whose sum
// (mod 2^W) equals the sum of all operands. Every level groups the operands
// in threes and replaces each group by a full-adder row (sum = a^b^c,
// carry = majority(a,b,c) shifted left by one); operands left over pass to
// the next level unchanged. Levels are generated until two operands remain,
// so the depth grows as log base 1.5 of N (e.g. 297 operands: 13 levels).
// There is no carry propagation inside: a carry-propagate adder after the
// tree turns the pair into a two's complement result.
//
// Purely combinational. The tree of compressors summing all partial
// products follows the architecture; using 3:2 compressors only is this
// design's choice.
module csa_tree #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0][W-1:0] in,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);

  // Operands left after l levels of reduction.
  function automatic int ops_at(int l);
    int n = N;
    for (int i = 0; i < l; i++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int depth();
    int l = 0;
    while (ops_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned LEVELS = depth();

  // g_lv[l].v: the operands left after l levels of reduction.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lv
    localparam int unsigned NI = ops_at(l);
    logic [W-1:0] v [NI];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < N; i++) begin : g_op
        assign v[i] = in[i];
      end
    end else begin : g_red
      localparam int unsigned NP = ops_at(l - 1);
      localparam int unsigned G  = NP / 3;
      localparam int unsigned R  = NP % 3;
      for (genvar g = 0; g < G; g++) begin : g_fa
        logic [W-1:0] a, b, c;
        assign a = g_lv[l-1].v[3*g];
        assign b = g_lv[l-1].v[3*g+1];
        assign c = g_lv[l-1].v[3*g+2];
        assign v[2*g]   = a ^ b ^ c;
        assign v[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
      end
      for (genvar r = 0; r < R; r++) begin : g_pass
        assign v[2*G+r] = g_lv[l-1].v[3*G+r];
      end
    end
  end

  if (N >= 2) begin : g_pair
    assign sum   = g_lv[LEVELS].v[0];
    assign carry = g_lv[LEVELS].v[1];
  end else begin : g_single
    assign sum   = g_lv[LEVELS].v[0];
    assign carry = '0;
  end

endmodule
