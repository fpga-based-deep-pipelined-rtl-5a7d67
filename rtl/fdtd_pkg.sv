// fdtd_pkg: types and constants shared by the FDTD accelerator.
//
// A grid cell of the 2-D TM FDTD problem carries three single-precision
// field values, Ez, Hx and Hy, which travel together as one 96-bit record
// through memory, the shift-register arrays and the chain of PCMs. A
// stream element adds a valid bit that separates real cells from the flush
// elements fed in after the last cell of a pass. The four update
// coefficients C1..C4 of Eqs. (1)-(3) form one record as well.
//
// The PE latencies fixed here determine the latency of a PCM: a cell that
// enters a PCM enters the next one pcm_lat(N) pipeline steps later. Single precision
// follows the evaluated design; the record layout and latencies are this
// implementation's own choices.
package fdtd_pkg;

  typedef logic [31:0] fp32_t;

  // One grid cell: Ez(i,j), Hx(i,j+1/2) and Hy(i+1/2,j), stored at (i,j).
  typedef struct packed {
    fp32_t ez;
    fp32_t hx;
    fp32_t hy;
  } cell_t;

  // One element of the cell stream between reader, PCMs and writer.
  typedef struct packed {
    logic  valid;
    cell_t data;
  } elem_t;

  // Update coefficients of Eqs. (1)-(3), uniform over the grid.
  typedef struct packed {
    fp32_t c1;
    fp32_t c2;
    fp32_t c3;
    fp32_t c4;
  } coef_t;

  // Pipeline depth of the electric-field PE: subtract, multiply, subtract, add.
  localparam int unsigned PE_EZ_LAT = 4;
  // Pipeline depth of a magnetic-field PE: subtract, multiply, subtract.
  localparam int unsigned PE_H_LAT  = 3;

  // Steps (advances of the pipeline) from a cell entering a PCM to the
  // same cell entering the next one, for an N x N grid: the magnetic update
  // of cell p waits for Ez of cell p+N. Counted from the clock edge that
  // pushes the cell in to the edge that pushes it onward.
  function automatic int unsigned pcm_lat(int unsigned n);
    return n + PE_EZ_LAT + PE_H_LAT + 2;
  endfunction


endpackage
