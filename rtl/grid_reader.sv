// grid_reader: streams one grid from external memory into the PCM chain.
//
// After start it reads the N*N cells at base, base+1, ... (scan order) over
// a request/grant read port whose responses come back in request order
// after any latency. Responses land in a FIFO; the reader keeps no more
// requests in flight than the FIFO has free places, so it never loses a
// response. Towards the PCMs it offers one element at a time: avail says an
// element is ready and take (the pipeline's advance signal) consumes it.
// First come the N*N cells, marked valid, then NPAD invalid flush elements
// that push the last cells through the chain of PCMs. done pulses once the
// last flush element is taken.
//
// The design reads the grid from external memory in scan order, once per
// pass; the port protocol, the FIFO and the flush count are this
// implementation's choices.
module grid_reader
  import fdtd_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned NPAD  = 45452,
  parameter int unsigned FIFO  = 16,
  parameter int unsigned AW    = 21
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  // memory read port
  output logic          rd_req,
  output logic [AW-1:0] rd_addr,
  input  logic          rd_gnt,
  input  logic          rd_valid,
  input  cell_t         rd_data,
  // element stream
  output elem_t         out,
  output logic          avail,
  input  logic          take,
  output logic          busy,
  output logic          done
);

  localparam int unsigned CELLS = N * N;
  localparam int unsigned CCW   = $clog2(CELLS + 1);
  localparam int unsigned PCW   = $clog2(NPAD + 1);
  localparam int unsigned FCW   = $clog2(FIFO + 1);

  logic [CCW-1:0] issued, sent;
  logic [PCW-1:0] padded;
  logic [FCW-1:0] inflight, fcount;
  logic           f_empty, f_full, pop;
  cell_t          f_head;

  sync_fifo #(.WIDTH($bits(cell_t)), .DEPTH(FIFO)) u_fifo (
    .clk, .rst_n,
    .push  (rd_valid),
    .din   (rd_data),
    .pop   (pop),
    .dout  (f_head),
    .empty (f_empty),
    .full  (f_full),
    .count (fcount)
  );

  logic in_cells, in_pad;
  assign in_cells = busy && (sent < CCW'(CELLS));
  assign in_pad   = busy && !in_cells && (padded < PCW'(NPAD));

  assign rd_req  = busy && (issued < CCW'(CELLS)) &&
                   ((FCW+1)'(inflight) + (FCW+1)'(fcount) < (FCW+1)'(FIFO));
  assign rd_addr = base + AW'(issued);

  assign avail     = in_cells ? !f_empty : in_pad;
  assign out.valid = in_cells;
  assign out.data  = in_cells ? f_head : '0;
  assign pop       = take && in_cells && !f_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      issued   <= '0;
      sent     <= '0;
      padded   <= '0;
      inflight <= '0;
    end else begin
      done     <= 1'b0;
      inflight <= inflight + FCW'(rd_req && rd_gnt) - FCW'(rd_valid);
      if (start && !busy) begin
        busy   <= 1'b1;
        issued <= '0;
        sent   <= '0;
        padded <= '0;
      end else if (busy) begin
        if (rd_req && rd_gnt) issued <= issued + CCW'(1);
        if (pop)              sent   <= sent + CCW'(1);
        if (take && in_pad) begin
          padded <= padded + PCW'(1);
          if (padded == PCW'(NPAD - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_valid && f_full))
    else $error("grid_reader: read response arrived with the FIFO full");

endmodule
