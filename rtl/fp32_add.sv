// fp32_add: combinational IEEE-754 single-precision adder/subtractor.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1), rounded to nearest,
// ties to even. The operands are aligned with three extra bits (guard,
// round, sticky), added or subtracted as magnitudes, normalised with a
// leading-zero count and rounded. Subnormal inputs are read as zero and
// results below the smallest normal number are flushed to a signed zero,
// as FPGA floating-point cores commonly do; infinities and NaNs follow
// IEEE-754 (a NaN result is the quiet NaN 7fc00000). Exact cancellation
// gives +0. The PEs register its output, so it has no clock.
// Single precision is what the design computes in; the rest of the
// arithmetic detail is this implementation's choice.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);

  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  d;
  logic [26:0] mx_ext, my_ext;
  logic [27:0] sum;
  logic [26:0] norm;
  logic signed [9:0] e_res;
  logic [4:0]  lz;
  logic        g, r, s, rnd;
  logic [24:0] mant_r;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (a[22:0] == 23'd0);
    b_inf  = (eb == 8'hff) && (b[22:0] == 23'd0);
    a_nan  = (ea == 8'hff) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hff) && (b[22:0] != 23'd0);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};

    // Order the operands by magnitude: x is the larger one.
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sx = sa; ex = ea; mx = ma;
      sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb;
      sy = sa; ey = ea; my = ma;
    end

    // Align the smaller operand; bits shifted out collapse into the sticky bit.
    d      = ex - ey;
    mx_ext = {mx, 3'b000};
    if (d >= 8'd27) begin
      my_ext = 27'd1;
    end else begin
      my_ext = {my, 3'b000} >> d;
      if (d > 8'd0 && (({my, 3'b000} & ((27'd1 << d) - 27'd1)) != 27'd0))
        my_ext[0] = 1'b1;
    end

    if (sx == sy) sum = {1'b0, mx_ext} + {1'b0, my_ext};
    else          sum = {1'b0, mx_ext} - {1'b0, my_ext};

    // Normalise so that the hidden bit lands in norm[26].
    e_res = signed'({2'b00, ex});
    lz    = 5'd0;
    norm  = sum[26:0];
    if (sum[27]) begin
      norm  = sum[27:1];
      norm[0] = sum[1] | sum[0];
      e_res = e_res + 10'sd1;
    end else begin
      for (int k = 26; k >= 0; k--) begin
        if (sum[k]) begin
          lz = 5'(26 - k);
          break;
        end
      end
      norm  = sum[26:0] << lz;
      e_res = e_res - signed'({5'd0, lz});
    end

    // Round to nearest, ties to even.
    g   = norm[2];
    r   = norm[1];
    s   = norm[0];
    rnd = g && (r || s || norm[3]);
    mant_r = {1'b0, norm[26:3]} + {24'd0, rnd};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 10'sd1;
    end

    // Pack, special cases last so that they take priority.
    if (sum == 28'd0)           y = 32'h0000_0000;
    else if (e_res >= 10'sd255) y = {sx, 8'hff, 23'd0};
    else if (e_res <= 10'sd0)   y = {sx, 31'd0};
    else                        y = {sx, e_res[7:0], mant_r[22:0]};

    if (a_zero && b_zero)       y = {sa & sb, 31'd0};
    else if (a_zero)            y = {sb, b[30:0]};
    else if (b_zero)            y = a;
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = 32'h7fc0_0000;
    else if (a_inf)             y = {sa, 8'hff, 23'd0};
    else if (b_inf)             y = {sb, 8'hff, 23'd0};
  end

endmodule
