// tb_fdtd_accel: end-to-end test of the accelerator on a small grid.
//
// An 8 x 8 grid and 3 PCMs keep the run short. The testbench loads a
// random grid into the memory model, starts a run, waits for done and
// compares the grid at result_base bit for bit with the reference model
// iterated the same number of times. Runs:
//   1. 7 iterations with random memory grants: passes of 3, 3 and 1
//      iterations, so the last pass leaves two PCMs idle; reads arrive late
//      and writes are refused at times, stalling the whole chain.
//   2. 6 iterations with a memory that grants every request: two full
//      passes; the cycle count is checked against one cell per cycle plus
//      the flush of each pass and a small start-up allowance.
//   3. 0 iterations: done at once, grid untouched.
// It counts every mechanism (read stall, write back-pressure, flush, short
// pass, buffer swap) and fails if one never happened.
module tb_fdtd_accel;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned D  = 3;
  localparam int unsigned AW = $clog2(2 * N * N);
  localparam longint NPAD = longint'(D * pcm_lat(N));

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] max_iters = '0, passes_done;
  coef_t coef;
  logic busy, done;
  logic [AW-1:0] result_base;
  logic mem_rd_req, mem_rd_gnt, mem_rd_valid, mem_wr_req, mem_wr_gnt;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  cell_t mem_rd_data, mem_wr_data;

  int checks = 0, failures = 0;
  longint n_rd_stall = 0, n_wr_stall = 0, n_flush = 0, n_short = 0, n_swap = 0;

  fdtd_accel #(.N(N), .D(D)) dut (.*);

  dram_model #(.WORDS(2 * N * N), .AW(AW), .RD_PCT(60), .WR_PCT(50)) mem (
    .clk,
    .rd_req (mem_rd_req),  .rd_addr (mem_rd_addr), .rd_gnt (mem_rd_gnt),
    .rd_valid (mem_rd_valid), .rd_data (mem_rd_data),
    .wr_req (mem_wr_req),  .wr_addr (mem_wr_addr), .wr_data (mem_wr_data),
    .wr_gnt (mem_wr_gnt)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism coverage.
  always @(posedge clk) begin
    if (dut.u_rd.busy && !dut.rd_avail) n_rd_stall++;
    if (dut.rd_avail && !dut.wr_ready)  n_wr_stall++;
    if (dut.adv && !dut.link[0].valid)  n_flush++;
    if (dut.pass_start && int'(dut.n_active) < int'(D)) n_short++;
    if (dut.pass_start && dut.src_base != '0) n_swap++;
  end

  task automatic run(int iters, output longint cycles);
    cell_t g[], expct[];
    longint t0;
    init_grid(g, N);
    for (int p = 0; p < N * N; p++) mem.mem[p] = g[p];
    expct = g;
    for (int k = 0; k < iters; k++) iterate(expct, N, coef);
    @(negedge clk);
    max_iters = iters;
    start = 1'b1;
    t0 = mem.cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    cycles = mem.cyc - t0;
    checks++;
    if (passes_done != (iters + D - 1) / D) begin
      failures++;
      $display("passes %0d expected %0d", passes_done, (iters + D - 1) / D);
    end
    for (int p = 0; p < N * N; p++) begin
      checks++;
      if (mem.mem[int'(result_base) + p] !== expct[p]) begin
        failures++;
        if (failures < 10)
          $display("iters %0d cell %0d: got %h expected %h", iters, p,
                   mem.mem[int'(result_base) + p], expct[p]);
      end
    end
  endtask

  initial begin
    longint cyc;
    coef.c1 = 32'h3f000000;   // 0.5
    coef.c2 = 32'h3f000000;
    coef.c3 = 32'h3f000000;
    coef.c4 = 32'h3f000000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run(7, cyc);
    $display("run 1: 7 iterations in %0d cycles", cyc);

    mem.rd_pct = 100;
    mem.wr_pct = 100;
    coef.c1 = 32'h3e99999a;   // 0.3
    coef.c2 = 32'h3ecccccd;   // 0.4
    coef.c3 = 32'h3f19999a;   // 0.6
    coef.c4 = 32'h3e4ccccd;   // 0.2
    run(6, cyc);
    $display("run 2: 6 iterations in %0d cycles (%0d cells + %0d flush per pass)", cyc, N * N, NPAD);
    checks++;
    if (cyc < 2 * (N * N + NPAD) || cyc > 2 * (N * N + NPAD + 20)) begin
      failures++;
      $display("run 2 took %0d cycles, expected %0d..%0d", cyc, 2 * (N * N + NPAD),
               2 * (N * N + NPAD + 20));
    end

    run(0, cyc);
    checks++;
    if (result_base != '0) begin
      failures++;
      $display("zero-iteration run left the result at %0d", result_base);
    end

    $display("mechanisms: read stalls %0d, write stalls %0d, flush steps %0d, short passes %0d, buffer swaps %0d",
             n_rd_stall, n_wr_stall, n_flush, n_short, n_swap);
    checks += 5;
    if (n_rd_stall == 0) begin failures++; $display("no read stall seen"); end
    if (n_wr_stall == 0) begin failures++; $display("no write stall seen"); end
    if (n_flush == 0)    begin failures++; $display("no flush seen"); end
    if (n_short == 0)    begin failures++; $display("no short pass seen"); end
    if (n_swap == 0)     begin failures++; $display("no buffer swap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
