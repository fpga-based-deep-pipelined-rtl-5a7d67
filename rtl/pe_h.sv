// pe_h: magnetic-field processing element, Eq. (2) or Eq. (3).
//
//   H' = H - C * (Ez_far - Ez_near)
//
// For Hx (Eq. 2) Ez_far is Ez(i,j+1) and C is C3; for Hy (Eq. 3) Ez_far is
// Ez(i+1,j) and C is C4; Ez_near is Ez(i,j) of the same iteration in both.
// Fully pipelined: one cell per step with en = 1; the result sits in the
// output register after the PE_H_LAT-th (3rd) enabled clock edge, counting
// the edge that captures the inputs (difference, product, subtraction). With upd = 0 the old H passes
// through unchanged after the same latency. The equations and the
// pipelining are the design's; the stage split is this implementation's.
module pe_h
  import fdtd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_valid,
  input  logic  upd,
  input  fp32_t h,        // H of the previous half step
  input  fp32_t e_far,    // Ez one cell further along the derivative
  input  fp32_t e_near,   // Ez at the cell itself
  input  fp32_t c,
  output logic  out_valid,
  output fp32_t h_out
);

  logic [PE_H_LAT-1:0] v_q, u_q;
  fp32_t h_q [PE_H_LAT];
  fp32_t d_q, m_q, r_q;
  fp32_t d_d, m_d, r_d;

  fp32_add u_d (.a(e_far),  .b(e_near), .sub(1'b1), .y(d_d));
  fp32_mul u_m (.a(c),      .b(d_q),                .y(m_d));
  fp32_add u_r (.a(h_q[1]), .b(m_q),    .sub(1'b1), .y(r_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else if (en) begin
      v_q <= {v_q[PE_H_LAT-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      u_q    <= {u_q[PE_H_LAT-2:0], upd};
      h_q[0] <= h;
      for (int k = 1; k < PE_H_LAT; k++) h_q[k] <= h_q[k-1];
      d_q <= d_d;
      m_q <= m_d;
      r_q <= r_d;
    end
  end

  assign out_valid = v_q[PE_H_LAT-1];
  assign h_out     = u_q[PE_H_LAT-1] ? r_q : h_q[PE_H_LAT-1];

endmodule
