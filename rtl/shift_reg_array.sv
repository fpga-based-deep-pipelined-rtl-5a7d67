// shift_reg_array: shift-register array with parallel taps.
//
// Each step with shift = 1 pushes din in at position 0; every older value
// moves one position further and the value at position DEPTH-1 drops out.
// Tap k presents the value pushed k steps before the most recent one, so
// the PEs can read any position of the array in the same cycle. A valid
// bit travels with every value and is cleared by reset, so positions not
// yet filled read as invalid.
//
// The shifting behaviour and parallel taps are those of the design. How
// it is built is this implementation's choice: the data sit in a circular
// buffer (a write pointer instead of moving every word), which an FPGA maps
// to block RAM with one read port per tap; only the valid bits form a true
// shift register. Taps read combinationally from the current contents.
//
// Parameters: WIDTH data bits, DEPTH positions (at least 2) (default 1027 = N+3 for a
// 1024-wide grid, the lifetime of an FDTD value), NTAP taps at positions TAP.
module shift_reg_array #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1027,
  parameter int unsigned NTAP  = 2,
  parameter int unsigned TAP [NTAP] = '{0, 1026}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  input  logic             din_valid,
  output logic [WIDTH-1:0] tap_data  [NTAP],
  output logic             tap_valid [NTAP]
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [DEPTH-1:0] vld;
  logic [AW-1:0]    wptr;   // position the next value is written to

  initial begin
    for (int k = 0; k < NTAP; k++)
      assert (TAP[k] < DEPTH)
        else $error("shift_reg_array: tap %0d at %0d is beyond DEPTH %0d", k, TAP[k], DEPTH);
  end

  always_ff @(posedge clk) begin
    if (shift) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      vld  <= '0;
    end else if (shift) begin
      wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + AW'(1);
      vld  <= {vld[DEPTH-2:0], din_valid};
    end
  end

  // Tap k lives k+1 slots behind the write pointer, modulo DEPTH.
  always_comb begin
    for (int k = 0; k < NTAP; k++) begin
      logic [AW:0] idx;
      idx = {1'b0, wptr} + (AW+1)'(DEPTH) - (AW+1)'(TAP[k] + 1);
      if (idx >= (AW+1)'(DEPTH)) idx = idx - (AW+1)'(DEPTH);
      tap_data[k]  = mem[idx[AW-1:0]];
      tap_valid[k] = vld[TAP[k]];
    end
  end

endmodule
