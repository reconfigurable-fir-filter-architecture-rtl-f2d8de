// mcm_unit: multiple constant multiplication of one input sample by all N
// fixed filter coefficients, with shifts and adds only.
//
// Each coefficient magnitude |h| is written in canonic signed digit (CSD)
// form, |h| = sum_b d_b 2^b with d_b in {-1, 0, +1} and no two adjacent
// non-zero digits, and |h| * x is the sum of x shifted left by b for every
// d_b = +1 minus the same for every d_b = -1. The digits are worked out from
// the COEFS parameter while the design is elaborated, so only the adders and
// subtractors for non-zero digits are built; there is no multiplier.
// Two kinds of common sub-expression are shared:
//  - digit pairs: two non-zero digits two places apart (patterns 101 and
//    10-1) are 5x or 3x, shifted. 3x = 4x - x and 5x = 4x + x are built once
//    per unit and every coefficient takes its pairs from them, which saves
//    one adder per pair. Digits are paired greedily from the LSB;
//  - whole products: |h| * x is built only for the first coefficient of each
//    magnitude, and every later coefficient of the same magnitude reuses it,
//    negated where its sign differs. A linear-phase (symmetric) filter so
//    needs only half its products.
// Other patterns are left as single shifted terms.
//
// Timing: purely combinational. prod[i] = h(i) * x exactly, DATA_W + COEF_W
// bits wide.
//
// Shift-and-add multiplication with shared sub-expressions follows the
// published design; the particular sharing used here (3x/5x pairs, equal
// magnitudes) is this implementation's own, as the published elimination
// algorithm is not reproduced.
module mcm_unit #(
  parameter int unsigned N      = fir_pkg::N_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = fir_pkg::COEF_W_DEF,
  parameter int          COEFS [N] = fir_pkg::COEF_LP32
) (
  input  logic signed [DATA_W-1:0]        x,
  output logic signed [DATA_W+COEF_W-1:0] prod [N]
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned DIGITS = COEF_W + 1;   // CSD may need one digit more

  // CSD digit at position pos of value: scanning from the LSB, an odd
  // remainder gives +1 when it is 1 mod 4 and -1 when it is 3 mod 4.
  function automatic int csd_digit(int value, int pos);
    int v;
    int d;
    v = value;
    d = 0;
    for (int b = 0; b <= pos; b++) begin
      if ((v % 2) != 0) begin
        d = (((v % 4) + 4) % 4 == 1) ? 1 : -1;
        v = v - d;
      end else begin
        d = 0;
      end
      v = v / 2;
    end
    return d;
  endfunction

  // Term placed at digit position pos of value: 0 none, +-1 a single digit
  // (x << pos), +-3 or +-5 a digit pair at pos and pos+2 (3x or 5x << pos).
  function automatic int term_at(int value, int pos);
    int b;
    int d;
    int d2;
    b = 0;
    while (b < DIGITS && b <= pos) begin
      d  = csd_digit(value, b);
      d2 = (b + 2 < DIGITS) ? csd_digit(value, b + 2) : 0;
      if (d != 0 && d2 != 0) begin
        // pair at b and b+2 (b+1 is zero in CSD)
        if (b == pos) return (d == d2) ? 5 * d : 3 * d2;
        if (pos <= b + 2) return 0;
        b += 3;
      end else begin
        if (b == pos) return d;
        b += 1;
      end
    end
    return 0;
  endfunction

  function automatic int abs_int(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Index of the first coefficient whose magnitude equals that of COEFS[i].
  function automatic int first_same(int i);
    for (int k = 0; k < N; k++)
      if (abs_int(COEFS[k]) == abs_int(COEFS[i])) return k;
    return i;
  endfunction

  logic signed [PROD_W-1:0] x_ext;
  logic signed [PROD_W-1:0] mag_prod [N];   // |h(i)| * x, used where first_same(i) == i
  assign x_ext = PROD_W'(x);

  // Shared digit pairs: 10-1 = 3 and 101 = 5.
  logic signed [PROD_W-1:0] x3;
  logic signed [PROD_W-1:0] x5;
  assign x3 = (x_ext <<< 2) - x_ext;
  assign x5 = (x_ext <<< 2) + x_ext;

  for (genvar i = 0; i < N; i++) begin : g_coef
    localparam int FIRST = first_same(i);
    if (FIRST == i) begin : g_build
      logic signed [PROD_W-1:0] term [DIGITS];
      for (genvar b = 0; b < DIGITS; b++) begin : g_digit
        localparam int K = term_at(abs_int(COEFS[i]), b);
        if (K == 1) begin : g_add1
          assign term[b] = x_ext <<< b;
        end else if (K == -1) begin : g_sub1
          assign term[b] = -(x_ext <<< b);
        end else if (K == 3) begin : g_add3
          assign term[b] = x3 <<< b;
        end else if (K == -3) begin : g_sub3
          assign term[b] = -(x3 <<< b);
        end else if (K == 5) begin : g_add5
          assign term[b] = x5 <<< b;
        end else if (K == -5) begin : g_sub5
          assign term[b] = -(x5 <<< b);
        end else begin : g_zero
          assign term[b] = '0;
        end
      end
      always_comb begin
        mag_prod[i] = '0;
        for (int b = 0; b < DIGITS; b++) mag_prod[i] = mag_prod[i] + term[b];
      end
    end else begin : g_share
      assign mag_prod[i] = '0;   // not used: the product of coefficient FIRST serves
    end
    if (COEFS[i] < 0) begin : g_neg
      assign prod[i] = -mag_prod[FIRST];
    end else begin : g_pos
      assign prod[i] = mag_prod[FIRST];
    end
  end

endmodule
