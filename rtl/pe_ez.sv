// pe_ez: electric-field processing element, Eq. (1).
//
//   Ez' = Ez - C1 * (Hx(i,j+1/2) - Hx(i,j-1/2)) + C2 * (Hy(i+1/2,j) - Hy(i-1/2,j))
//
// Fully pipelined: one cell enters and one result leaves on every step with
// en = 1. The result sits in the output register after the PE_EZ_LAT-th (4th)
// enabled clock edge, counting the edge that captures the inputs. Stage 1 forms the two differences,
// stage 2 the two products, stage 3 subtracts the first product from Ez and
// stage 4 adds the second, the order in which Eq. (1) is written. When upd
// is 0 (a boundary cell or an idle PCM) the old Ez comes out unchanged
// after the same latency. Coefficients are read at stage 2 and must be
// held steady while a pass runs. The equation and full pipelining are the
// design's; the stage split is this implementation's choice.
module pe_ez
  import fdtd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_valid,
  input  logic  upd,
  input  fp32_t ez,      // Ez(i,j), previous iteration
  input  fp32_t hx,      // Hx(i,j+1/2)
  input  fp32_t hx_s,    // Hx(i,j-1/2)
  input  fp32_t hy,      // Hy(i+1/2,j)
  input  fp32_t hy_w,    // Hy(i-1/2,j)
  input  fp32_t c1,
  input  fp32_t c2,
  output logic  out_valid,
  output fp32_t ez_out
);

  logic [PE_EZ_LAT-1:0] v_q, u_q;
  fp32_t ez_q  [PE_EZ_LAT];
  fp32_t dhx_q, dhy_q, m1_q, m2_q, m2_qq, t_q, r_q;
  fp32_t dhx_d, dhy_d, m1_d, m2_d, t_d, r_d;

  fp32_add u_dhx (.a(hx),    .b(hx_s), .sub(1'b1), .y(dhx_d));
  fp32_add u_dhy (.a(hy),    .b(hy_w), .sub(1'b1), .y(dhy_d));
  fp32_mul u_m1  (.a(c1),    .b(dhx_q),            .y(m1_d));
  fp32_mul u_m2  (.a(c2),    .b(dhy_q),            .y(m2_d));
  fp32_add u_t   (.a(ez_q[1]), .b(m1_q), .sub(1'b1), .y(t_d));
  fp32_add u_r   (.a(t_q),   .b(m2_qq), .sub(1'b0), .y(r_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else if (en) begin
      v_q <= {v_q[PE_EZ_LAT-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      u_q   <= {u_q[PE_EZ_LAT-2:0], upd};
      ez_q[0] <= ez;
      for (int k = 1; k < PE_EZ_LAT; k++) ez_q[k] <= ez_q[k-1];
      dhx_q <= dhx_d;
      dhy_q <= dhy_d;
      m1_q  <= m1_d;
      m2_q  <= m2_d;
      m2_qq <= m2_q;
      t_q   <= t_d;
      r_q   <= r_d;
    end
  end

  assign out_valid = v_q[PE_EZ_LAT-1];
  assign ez_out    = u_q[PE_EZ_LAT-1] ? r_q : ez_q[PE_EZ_LAT-1];

endmodule
