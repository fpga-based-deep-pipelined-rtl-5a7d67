// grid_writer: writes the cells leaving the last PCM to external memory.
//
// After start it accepts valid cells (push) into a FIFO and writes them
// over a request/grant write port to base, base+1, ... in arrival order,
// which is the scan order of the grid. ready stays high while the FIFO has
// room, and the pipeline advances only then, so a slow memory stalls the
// chain of PCMs instead of losing cells. done pulses when the N*N-th cell
// has been granted.
//
// The design writes only the results of the final PCM back to memory; the
// port protocol and the FIFO are this implementation's choices.
module grid_writer
  import fdtd_pkg::*;
#(
  parameter int unsigned N    = 1024,
  parameter int unsigned FIFO = 16,
  parameter int unsigned AW   = 21
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic          push,
  input  cell_t         din,
  output logic          ready,
  // memory write port
  output logic          wr_req,
  output logic [AW-1:0] wr_addr,
  output cell_t         wr_data,
  input  logic          wr_gnt,
  output logic          busy,
  output logic          done
);

  localparam int unsigned CELLS = N * N;
  localparam int unsigned CCW   = $clog2(CELLS + 1);

  logic [CCW-1:0] written;
  logic           f_empty, f_full;
  logic [$clog2(FIFO+1)-1:0] fcount;

  sync_fifo #(.WIDTH($bits(cell_t)), .DEPTH(FIFO)) u_fifo (
    .clk, .rst_n,
    .push  (push),
    .din   (din),
    .pop   (wr_req && wr_gnt),
    .dout  (wr_data),
    .empty (f_empty),
    .full  (f_full),
    .count (fcount)
  );

  assign ready   = (fcount < $bits(fcount)'(FIFO));
  assign wr_req  = busy && !f_empty;
  assign wr_addr = base + AW'(written);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      written <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        written <= '0;
      end else if (busy && wr_req && wr_gnt) begin
        written <= written + CCW'(1);
        if (written == CCW'(CELLS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) !(push && f_full))
    else $error("grid_writer: cell pushed while the FIFO is full");

endmodule
