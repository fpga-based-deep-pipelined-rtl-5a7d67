// fp32_mul: combinational IEEE-754 single-precision multiplier.
//
// Multiplies the two 24-bit significands into a 48-bit product (the DSP
// blocks of an FPGA do this), normalises by at most one position, rounds
// to nearest with ties to even and adds the exponents. Subnormal inputs
// are read as zero and results below the smallest normal number are
// flushed to a signed zero; infinities and NaNs follow IEEE-754 (a NaN
// result is the quiet NaN 7fc00000). The PEs register its output, so it
// has no clock. Single precision is what the design computes in; the
// rest is this implementation's choice.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        sy;
  logic [7:0]  ea, eb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] p;
  logic [23:0] mant;
  logic        g, s, rnd;
  logic [24:0] mant_r;
  logic signed [10:0] e_res;

  always_comb begin
    sy = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hff) && (a[22:0] == 23'd0);
    b_inf  = (eb == 8'hff) && (b[22:0] == 23'd0);
    a_nan  = (ea == 8'hff) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hff) && (b[22:0] != 23'd0);

    p     = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e_res = signed'({3'b000, ea}) + signed'({3'b000, eb}) - 11'sd127;
    if (p[47]) begin
      mant  = p[47:24];
      g     = p[23];
      s     = |p[22:0];
      e_res = e_res + 11'sd1;
    end else begin
      mant  = p[46:23];
      g     = p[22];
      s     = |p[21:0];
    end

    rnd    = g && (s || mant[0]);
    mant_r = {1'b0, mant} + {24'd0, rnd};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 11'sd1;
    end

    if (e_res >= 11'sd255)    y = {sy, 8'hff, 23'd0};
    else if (e_res <= 11'sd0) y = {sy, 31'd0};
    else                      y = {sy, e_res[7:0], mant_r[22:0]};

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = 32'h7fc0_0000;
    else if (a_inf || b_inf)  y = {sy, 8'hff, 23'd0};
    else if (a_zero || b_zero) y = {sy, 31'd0};
  end

endmodule
