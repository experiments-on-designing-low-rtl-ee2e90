// Polyphase decimate-by-2 FIR filter with fixed coefficients, built from
// mixed-radix Booth constant multipliers and one Wallace tree.
//
// Structure. The input stream is split by a commutator into an even and an
// odd branch: the first sample of each pair waits in a hold register, and
// when the second one arrives both branch delay lines shift at once, so the
// branches and the output run at half the input rate. Tap k of the filter
// reads branch (k mod 2) at delay k/2; the output is
//   y[m] = sum_k h[k] * x[2m+1-k]     (x counted from 0 after reset).
//
// Arithmetic. Each coefficient is Booth-recoded at elaboration time with
// mixed radix: the bits are cut into groups of one bit (a radix-2 Booth
// digit, c[i-1]-c[i], in -1..+1) and of two bits (a radix-4 Booth digit,
// -2c[i+1]+c[i]+c[i-1], in -2..+2). Any such cut represents the coefficient
// exactly; the cut with the fewest non-zero digits is chosen per
// coefficient (for 16-bit values it beats plain radix 4 about half of the
// time, e.g. 2 = one radix-4 digit at bit 1 instead of -2+4). Every non-zero
// digit becomes one partial product, the tap sample shifted by the digit's weight and inverted if the
// digit is negative; zero coefficients and zero digits cost nothing. The
// partial products of all taps, plus one constant that holds the +1 of every
// inverted product, are reduced together by a single Wallace tree (csa_tree)
// and one carry-propagate adder. The exact sum is scaled by 2^-FRAC_W
// (floor) and saturated to OUT_W bits.
//
// Timing: the output register and out_valid are updated on the edge that
// accepts the second sample of a pair; out_valid pulses for one cycle.
// clk_req is high whenever a flip-flop may change, so the clock can be
// gated off whenever it is low.
//
// Polyphase decimation, direct form, mixed-radix Booth for fixed
// coefficients and a common Wallace tree with a final CPA follow the
// architecture; the grouping rule (fewest non-zero digits, ties to the
// radix-4 group), the widths, truncation and saturation are this design's
// choices.
module const_fir_dec2 #(
  parameter int unsigned   NTAPS  = dec_pkg::HB_TAPS,
  parameter int unsigned   DATA_W = dec_pkg::DATA_W,
  parameter int unsigned   COEF_W = dec_pkg::COEF_W,
  parameter int unsigned   FRAC_W = dec_pkg::FRAC_W,
  parameter int unsigned   OUT_W  = dec_pkg::DATA_W,
  parameter dec_pkg::coef_t COEFS [NTAPS] = dec_pkg::HB_COEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data,
  output logic                     clk_req
);

  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(NTAPS) + 1;
  localparam int unsigned NE    = (NTAPS + 1) / 2;   // even-branch taps
  localparam int unsigned NO    = NTAPS / 2;         // odd-branch taps

  // ---------------------------------------------------------------------
  // Booth recoding of the constants (elaboration time only)
  // ---------------------------------------------------------------------
  function automatic logic cbit(dec_pkg::coef_t c, int i);
    return (i < 0) ? 1'b0 : c[i];
  endfunction

  function automatic int r2_digit(dec_pkg::coef_t c, int i);
    return int'(cbit(c, i - 1)) - int'(cbit(c, i));
  endfunction

  // Booth digit of a radix-4 group starting at bit i: bits i+1, i, i-1.
  function automatic int r4_digit(dec_pkg::coef_t c, int i);
    return -2 * int'(cbit(c, i + 1)) + int'(cbit(c, i)) + int'(cbit(c, i - 1));
  endfunction

  function automatic int nz(int d);
    return (d != 0) ? 1 : 0;
  endfunction

  // Mixed-radix recoding of one coefficient: signed digit at each bit
  // position (0 inside a two-bit group). Bits are cut into one-bit groups
  // (radix-2 digit) and two-bit groups (radix-4 digit) so that the number of
  // non-zero digits is minimal: dynamic programming from the MSB down, ties
  // go to the radix-4 group.
  typedef logic signed [2:0] digit_t;
  typedef digit_t [COEF_W-1:0] digits_t;

  function automatic digits_t recode(dec_pkg::coef_t c);
    int      cost [COEF_W + 2];
    int      i, k;
    digits_t dg;
    dg = '0;
    cost[COEF_W]     = 0;
    cost[COEF_W + 1] = 0;
    for (i = COEF_W - 1; i >= 0; i--) begin
      cost[i] = nz(r2_digit(c, i)) + cost[i + 1];
      if (i + 1 < COEF_W && nz(r4_digit(c, i)) + cost[i + 2] <= cost[i])
        cost[i] = nz(r4_digit(c, i)) + cost[i + 2];
    end
    i = 0;
    while (i < COEF_W) begin
      k = (i + 1 < COEF_W && nz(r4_digit(c, i)) + cost[i + 2] == cost[i]) ? 2 : 1;
      dg[i] = 3'((k == 2) ? r4_digit(c, i) : r2_digit(c, i));
      i += k;
    end
    return dg;
  endfunction

  function automatic int count_nz(digits_t dg, int upto);
    int n = 0;
    for (int p = 0; p < upto; p++) if (dg[p] != 0) n++;
    return n;
  endfunction

  function automatic int count_neg(digits_t dg);
    int n = 0;
    for (int p = 0; p < COEF_W; p++) if (dg[p] < 0) n++;
    return n;
  endfunction

  // Position of each tap's first partial product in the common tree, and
  // the totals; entry NTAPS holds the number of partial products.
  typedef logic [NTAPS:0][31:0] base_t;

  function automatic base_t pp_bases();
    base_t b;
    b[0] = 0;
    for (int i = 0; i < NTAPS; i++) b[i+1] = b[i] + 32'(count_nz(recode(COEFS[i]), COEF_W));
    return b;
  endfunction

  function automatic int total_neg();
    int n = 0;
    for (int i = 0; i < NTAPS; i++) n += count_neg(recode(COEFS[i]));
    return n;
  endfunction

  localparam base_t       BASE = pp_bases();
  localparam int unsigned NPP  = BASE[NTAPS];
  localparam int unsigned NOPS = NPP + 1;          // + inversion correction

  // ---------------------------------------------------------------------
  // Polyphase commutator and branch delay lines
  // ---------------------------------------------------------------------
  logic                     phase;                  // 1: next sample closes a pair
  logic signed [DATA_W-1:0] hold;
  logic signed [DATA_W-1:0] ev [NE];                // ev[0] is the newest sample
  logic signed [DATA_W-1:0] od [NO];
  logic signed [DATA_W-1:0] tap [NTAPS];            // window seen at the pair edge
  logic                     fire;

  assign fire = in_valid & phase;

  // The products are formed from the window the delay lines will hold after
  // the pair edge, so the output register is loaded on that same edge.
  always_comb begin
    for (int k = 0; k < NTAPS; k++) begin
      if (k % 2 == 0) tap[k] = (k == 0) ? in_data : ev[k/2 - 1];
      else            tap[k] = (k == 1) ? hold    : od[(k-1)/2 - 1];
    end
  end

  // ---------------------------------------------------------------------
  // Partial products, Wallace tree, carry-propagate adder
  // ---------------------------------------------------------------------
  logic [NOPS-1:0][ACC_W-1:0] ops;
  logic [ACC_W-1:0]           t_sum, t_carry;
  logic signed [ACC_W-1:0]    acc;
  logic signed [ACC_W-1:0]    scaled;
  logic signed [OUT_W-1:0]    y;

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    localparam digits_t DG = recode(COEFS[k]);
    for (genvar p = 0; p < COEF_W; p++) begin : g_slot
      localparam int D   = int'(DG[p]);
      localparam int SGN = (D > 0) ? 1 : (D < 0) ? -1 : 0;
      localparam int SH  = p + ((D == 2 || D == -2) ? 1 : 0);
      localparam int IDX = int'(BASE[k]) + count_nz(DG, p);
      if (SGN != 0) begin : g_pp
        logic [ACC_W-1:0] shifted;
        assign shifted = ACC_W'(tap[k]) << SH;
        assign ops[IDX] = (SGN < 0) ? ~shifted : shifted;
      end
    end
  end
  assign ops[NPP] = ACC_W'(total_neg());

  csa_tree #(.N(NOPS), .W(ACC_W)) u_tree (
    .in   (ops),
    .sum  (t_sum),
    .carry(t_carry)
  );

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sd1 <<< (OUT_W - 1));

  always_comb begin
    acc    = t_sum + t_carry;                       // carry-propagate adder
    scaled = acc >>> FRAC_W;
    if (scaled > MAXV)      y = MAXV[OUT_W-1:0];
    else if (scaled < MINV) y = MINV[OUT_W-1:0];
    else                    y = scaled[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      hold      <= '0;
      for (int i = 0; i < NE; i++) ev[i] <= '0;
      for (int i = 0; i < NO; i++) od[i] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
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

  assign clk_req = in_valid | out_valid;

  initial begin
    assert (NTAPS >= 2) else $error("const_fir_dec2: NTAPS must be at least 2");
    assert (COEF_W % 2 == 0) else $error("const_fir_dec2: COEF_W must be even");
  end

endmodule
