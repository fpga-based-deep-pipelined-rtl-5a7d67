// fdtd_accel: deep-pipelined 2-D FDTD accelerator, D iterations per pass.
//
// The grid (N x N cells of Ez, Hx, Hy in single precision) lives in
// external memory. Each pass the reader streams it in scan order through
// a chain of D pipelined computation modules (PCMs); PCM k performs
// iteration k of the pass on the cells the previous PCM hands it, so D
// iterations run at once on a single stream of one cell per clock cycle.
// Only the last PCM's results go back to memory, so memory is touched
// twice per D iterations instead of twice per iteration. pass_ctrl repeats
// passes, swapping two grid buffers, until max_iters iterations are done.
//
// One signal, adv, moves every register of the chain: it is high when the
// reader has an element and the writer has room. A late memory read or a
// slow write therefore stalls the whole chain for that cycle, and nothing
// is lost. After the N*N cells of a pass the reader sends
// D*pcm_lat(N) invalid flush elements to empty the chain.
//
// Interfaces: start/max_iters/coef from the host (coefficients held steady
// during a run), busy/done/result_base back; a read port (request/grant,
// in-order responses) and a write port (request/grant) to the external
// memory, word-addressed by cell. Defaults are the evaluated configuration:
// a 1024 x 1024 grid and 44 PCMs. Memory protocol, buffer layout and the
// short last pass are this implementation's choices.
module fdtd_accel
  import fdtd_pkg::*;
#(
  parameter int unsigned N    = 1024,
  parameter int unsigned D    = 44,
  parameter int unsigned FIFO = 16,
  parameter int unsigned AW   = $clog2(2 * N * N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host
  input  logic          start,
  input  logic [31:0]   max_iters,
  input  coef_t         coef,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] result_base,
  output logic [31:0]   passes_done,
  // external memory read port
  output logic          mem_rd_req,
  output logic [AW-1:0] mem_rd_addr,
  input  logic          mem_rd_gnt,
  input  logic          mem_rd_valid,
  input  cell_t         mem_rd_data,
  // external memory write port
  output logic          mem_wr_req,
  output logic [AW-1:0] mem_wr_addr,
  output cell_t         mem_wr_data,
  input  logic          mem_wr_gnt
);

  localparam int unsigned NPAD = D * pcm_lat(N);
  localparam int unsigned DW   = $clog2(D + 1);

  logic          pass_start, wr_done, rd_done, rd_busy, wr_busy;
  logic [AW-1:0] src_base, dst_base;
  logic [DW-1:0] n_active;
  logic          rd_avail, wr_ready, adv;
  elem_t         link [D+1];

  pass_ctrl #(.N(N), .D(D), .AW(AW)) u_ctrl (
    .clk, .rst_n,
    .start, .max_iters,
    .wr_done,
    .pass_start, .src_base, .dst_base, .n_active,
    .busy, .done, .result_base, .passes_done
  );

  grid_reader #(.N(N), .NPAD(NPAD), .FIFO(FIFO), .AW(AW)) u_rd (
    .clk, .rst_n,
    .start    (pass_start),
    .base     (src_base),
    .rd_req   (mem_rd_req),
    .rd_addr  (mem_rd_addr),
    .rd_gnt   (mem_rd_gnt),
    .rd_valid (mem_rd_valid),
    .rd_data  (mem_rd_data),
    .out      (link[0]),
    .avail    (rd_avail),
    .take     (adv),
    .busy     (rd_busy),
    .done     (rd_done)
  );

  assign adv = rd_avail && wr_ready;

  for (genvar k = 0; k < D; k++) begin : g_pcm
    pcm #(.N(N)) u_pcm (
      .clk, .rst_n,
      .adv,
      .active (DW'(k) < n_active),
      .coef,
      .in     (link[k]),
      .out    (link[k+1])
    );
  end

  grid_writer #(.N(N), .FIFO(FIFO), .AW(AW)) u_wr (
    .clk, .rst_n,
    .start   (pass_start),
    .base    (dst_base),
    .push    (adv && link[D].valid),
    .din     (link[D].data),
    .ready   (wr_ready),
    .wr_req  (mem_wr_req),
    .wr_addr (mem_wr_addr),
    .wr_data (mem_wr_data),
    .wr_gnt  (mem_wr_gnt),
    .busy    (wr_busy),
    .done    (wr_done)
  );

  // The flush must have emptied the chain by the time the writer is done,
  // the last cell must still be on its way to memory when the flush ends,
  // and a pass may only start with both sides idle.
  a_reader_first: assert property (@(posedge clk) disable iff (!rst_n) wr_done |-> !rd_busy)
    else $error("fdtd_accel: writer finished before the reader's flush");
  a_flush_covers: assert property (@(posedge clk) disable iff (!rst_n) rd_done |-> wr_busy)
    else $error("fdtd_accel: writer idle when the flush ended");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) pass_start |-> !rd_busy && !wr_busy)
    else $error("fdtd_accel: pass started while the previous one runs");

endmodule
