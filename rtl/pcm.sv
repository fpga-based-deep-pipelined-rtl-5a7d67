// pcm: pipelined computation module, one FDTD iteration of an N x N grid.
//
// Cells arrive one per step (adv = 1) in scan order: x from 0 to N-1 along
// a row, rows from y = 0 upwards; cell p = y*N + x. Two shift-register
// arrays hold the data each update needs:
//
//   src array  - the incoming cells of the previous iteration. The Ez PE
//                reads cell p (tap 0), Hy of cell p-1 (tap 1) and Hx of
//                cell p-N (tap N). The H PEs read the old Hx, Hy of cell p
//                again N+PE_EZ_LAT+1 steps later (tap N+PE_EZ_LAT+1).
//   ez array   - the new Ez values of this iteration. When Ez of cell p+N
//                enters it (tap 0), Ez of cell p+1 is at tap N-1 and Ez of
//                cell p at tap N, so the Hx PE (Eq. 2) and Hy PE (Eq. 3) of
//                cell p can run. Ez of cell p leaves with the new H values
//                from tap N+PE_H_LAT.
//
// A cell leaving the module is the same cell updated by one iteration. It
// is on the output N+PE_EZ_LAT+1+PE_H_LAT steps after the step that pushed
// it in, and the next step pushes it into the following module: pcm_lat(N)
// steps from module to module. Every
// register moves only on adv, so the whole chain of PCMs stalls as one
// pipeline. The valid bit of an element marks real cells; after a pass the
// source feeds invalid elements to push the last cells out. Two counters
// track the (x,y) of the cell at the Ez PE input and at the H PE input,
// counting valid cells and wrapping after N*N.
//
// Boundaries (this implementation's choice, the design leaves them open):
// Ez on the four outer edges, Hx in the top row and Hy in the right-most
// column are not updated, a perfectly conducting box when the edges start
// at zero. With active = 0 the module updates nothing and only delays the
// cells by the same latency; the last pass of a run uses this when the
// iteration count is not a multiple of the number of PCMs.
module pcm
  import fdtd_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adv,
  input  logic  active,
  input  coef_t coef,
  input  elem_t in,
  output elem_t out
);

  localparam int unsigned XW        = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned SRC_H_TAP = N + PE_EZ_LAT + 1;
  localparam int unsigned EZ_OUT_TAP = N + PE_H_LAT;
  localparam int unsigned SRC_TAPS [4] = '{0, 1, N, SRC_H_TAP};
  localparam int unsigned EZR_TAPS [4] = '{0, N - 1, N, EZ_OUT_TAP};

  // ---------------------------------------------------------------- src array
  cell_t src_d [4];
  logic  src_v [4];

  shift_reg_array #(
    .WIDTH ($bits(cell_t)),
    .DEPTH (SRC_H_TAP + 1),
    .NTAP  (4),
    .TAP   (SRC_TAPS)
  ) u_src (
    .clk, .rst_n,
    .shift     (adv),
    .din       (in.data),
    .din_valid (in.valid),
    .tap_data  (src_d),
    .tap_valid (src_v)
  );

  // Coordinates of the cell at src tap 0.
  logic [XW-1:0] ex, ey;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex <= '0;
      ey <= '0;
    end else if (adv && src_v[0]) begin
      if (ex == XW'(N - 1)) begin
        ex <= '0;
        ey <= (ey == XW'(N - 1)) ? '0 : ey + XW'(1);
      end else begin
        ex <= ex + XW'(1);
      end
    end
  end

  logic ez_upd;
  assign ez_upd = active && (ex != '0) && (ey != '0) &&
                  (ex != XW'(N - 1)) && (ey != XW'(N - 1));

  logic  ez_v;
  fp32_t ez_new;

  pe_ez u_pe_ez (
    .clk, .rst_n,
    .en       (adv),
    .in_valid (src_v[0]),
    .upd      (ez_upd),
    .ez       (src_d[0].ez),
    .hx       (src_d[0].hx),
    .hx_s     (src_d[2].hx),
    .hy       (src_d[0].hy),
    .hy_w     (src_d[1].hy),
    .c1       (coef.c1),
    .c2       (coef.c2),
    .out_valid(ez_v),
    .ez_out   (ez_new)
  );

  // ----------------------------------------------------------------- ez array
  fp32_t ezr_d [4];
  logic  ezr_v [4];

  shift_reg_array #(
    .WIDTH ($bits(fp32_t)),
    .DEPTH (EZ_OUT_TAP + 1),
    .NTAP  (4),
    .TAP   (EZR_TAPS)
  ) u_ezr (
    .clk, .rst_n,
    .shift     (adv),
    .din       (ez_new),
    .din_valid (ez_v),
    .tap_data  (ezr_d),
    .tap_valid (ezr_v)
  );

  // Coordinates of the cell at ez tap N, the cell the H PEs work on.
  logic [XW-1:0] hx_i, hy_j;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hx_i <= '0;
      hy_j <= '0;
    end else if (adv && ezr_v[2]) begin
      if (hx_i == XW'(N - 1)) begin
        hx_i <= '0;
        hy_j <= (hy_j == XW'(N - 1)) ? '0 : hy_j + XW'(1);
      end else begin
        hx_i <= hx_i + XW'(1);
      end
    end
  end

  logic  hxv, hyv;
  fp32_t hx_new, hy_new;

  pe_h u_pe_hx (
    .clk, .rst_n,
    .en       (adv),
    .in_valid (ezr_v[2]),
    .upd      (active && (hy_j != XW'(N - 1))),
    .h        (src_d[3].hx),
    .e_far    (ezr_d[0]),
    .e_near   (ezr_d[2]),
    .c        (coef.c3),
    .out_valid(hxv),
    .h_out    (hx_new)
  );

  pe_h u_pe_hy (
    .clk, .rst_n,
    .en       (adv),
    .in_valid (ezr_v[2]),
    .upd      (active && (hx_i != XW'(N - 1))),
    .h        (src_d[3].hy),
    .e_far    (ezr_d[1]),
    .e_near   (ezr_d[2]),
    .c        (coef.c4),
    .out_valid(hyv),
    .h_out    (hy_new)
  );

  assign out.valid   = hxv;
  assign out.data.ez = ezr_d[3];
  assign out.data.hx = hx_new;
  assign out.data.hy = hy_new;

  // The cell leaving with the new H values must be the one whose Ez sits at
  // the output tap of the ez array.
  a_out_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                 hxv == hyv && hxv == ezr_v[3])
    else $error("pcm: H results and Ez output out of step");

endmodule
