// fp64_add: combinational IEEE-754 binary64 adder, round to nearest even.
//
// Used by the scatter-add functional unit for floating-point scatter-adds.
// Works in the usual three steps: the operand with the larger magnitude is
// taken as the base and the other is shifted right to its exponent, keeping a
// guard, a round and a sticky bit; the two 53-bit significands are added or
// subtracted; the result is normalised (right by one after a carry, left by
// the leading-zero count after cancellation, stopping at the smallest
// exponent so that subnormal results come out exactly) and rounded to
// nearest even. Subnormal inputs and outputs are handled, overflow gives an
// infinity, inf - inf and any NaN input give the quiet NaN 0x7FF8_0000_0000_0000.
// An exact zero from opposite-signed operands is +0; (-0) + (-0) is -0.
//
// The design only asks for a floating-point adder in the scatter-add unit; the
// IEEE format, the rounding mode and this structure are this design's choices.
// Purely combinational: the functional unit around it supplies the pipeline.
module fp64_add (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  // Leading zeros of a 56-bit value (56 when zero).
  function automatic logic [5:0] lzc56(input logic [55:0] v);
    logic [5:0] n;
    n = 6'd56;
    for (int i = 0; i < 56; i++) begin
      if (v[i]) n = 6'(55 - i);
    end
    return n;
  endfunction

  logic        sa, sb, sx, sy;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic [62:0] mag_a, mag_b;
  logic        swap;
  logic [11:0] ex, ey;          // effective exponents (subnormal -> 1)
  logic [52:0] mx, my;          // significands with hidden bit
  logic [11:0] diff;
  logic [55:0] big, small_sh;
  logic        sticky;
  logic        eff_sub;
  logic [56:0] raw;
  logic [55:0] norm;
  logic [12:0] e_norm;
  logic [5:0]  lz;
  logic [5:0]  lsh;
  logic [53:0] rounded;
  logic        round_up;
  logic [12:0] e_fin;
  logic        res_sign;

  always_comb begin
    sa = a[63]; ea = a[62:52]; fa = a[51:0];
    sb = b[63]; eb = b[62:52]; fb = b[51:0];
    a_nan = (ea == 11'h7FF) && (fa != 0);
    b_nan = (eb == 11'h7FF) && (fb != 0);
    a_inf = (ea == 11'h7FF) && (fa == 0);
    b_inf = (eb == 11'h7FF) && (fb == 0);

    // Order the operands by magnitude: x is the larger.
    mag_a = a[62:0];
    mag_b = b[62:0];
    swap  = mag_b > mag_a;
    sx = swap ? sb : sa;
    sy = swap ? sa : sb;
    ex = {1'b0, swap ? eb : ea};
    ey = {1'b0, swap ? ea : eb};
    mx = {ex != 0, swap ? fb : fa};
    my = {ey != 0, swap ? fa : fb};
    if (ex == 0) ex = 12'd1;
    if (ey == 0) ey = 12'd1;

    // Align the smaller operand, collecting the bits shifted out as sticky.
    diff = ex - ey;
    big  = {mx, 3'b000};
    if (diff >= 12'd56) begin
      small_sh = '0;
      sticky   = |my;
    end else begin
      small_sh = {my, 3'b000} >> diff;
      sticky   = |({my, 3'b000} & ((56'd1 << diff) - 56'd1));
    end
    small_sh[0] = small_sh[0] | sticky;

    // Add or subtract the significands.
    eff_sub = sx ^ sy;
    if (eff_sub) raw = {1'b0, big} - {1'b0, small_sh};
    else         raw = {1'b0, big} + {1'b0, small_sh};

    // Normalise.
    lz  = 6'd0;
    lsh = 6'd0;
    if (raw[56]) begin
      norm   = {raw[56:2], raw[1] | raw[0]};
      e_norm = {1'b0, ex} + 13'd1;
    end else begin
      lz = lzc56(raw[55:0]);
      if ({7'd0, lz} < ({1'b0, ex} - 13'd1)) lsh = lz;
      else                                   lsh = 6'(ex - 12'd1);
      norm   = raw[55:0] << lsh;
      e_norm = {1'b0, ex} - {7'd0, lsh};
    end

    // Round to nearest, ties to even.
    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    rounded  = {1'b0, norm[55:3]} + {53'd0, round_up};
    e_fin    = e_norm;
    if (rounded[53]) begin
      rounded = rounded >> 1;
      e_fin   = e_fin + 13'd1;
    end

    res_sign = (eff_sub && raw == 0) ? 1'b0 : sx;

    // Assemble, with the special cases last.
    if (e_fin >= 13'd2047)
      y = {res_sign, 11'h7FF, 52'd0};
    else if (rounded[52])
      y = {res_sign, e_fin[10:0], rounded[51:0]};
    else
      y = {res_sign, 11'd0, rounded[51:0]};   // subnormal or zero

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) y = QNAN;
    else if (a_inf) y = a;
    else if (b_inf) y = b;
  end

endmodule
