// tb_fdtd_workload: the evaluated workload at full size, as far as it can
// be simulated: a 1024 x 1024 grid with the default 44 PCMs.
//
// The full run of 15360 iterations is 349 passes of 44 iterations and a
// last pass of 4 (15360 = 349*44 + 4). This testbench runs 48 iterations,
// one full pass and one such short last pass, so it covers every kind of
// pass the full run contains, and the buffer swap between them. The grid
// holds a point excitation in a field at rest, as an FDTD simulation
// starts. Every cell of the result is compared bit for bit with the
// reference model, and the cycle count with two passes of one cell per
// cycle plus flush.
module tb_fdtd_workload;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int unsigned N     = 1024;
  localparam int unsigned D     = 44;
  localparam int unsigned ITERS = 48;
  localparam int unsigned AW    = $clog2(2 * N * N);
  localparam longint PASS = longint'(N * N) + longint'(D) * longint'(pcm_lat(N));

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] max_iters = '0, passes_done;
  coef_t coef;
  logic busy, done;
  logic [AW-1:0] result_base;
  logic mem_rd_req, mem_rd_gnt, mem_rd_valid, mem_wr_req, mem_wr_gnt;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  cell_t mem_rd_data, mem_wr_data;

  int checks = 0, failures = 0;

  fdtd_accel dut (.*);

  dram_model #(.WORDS(2 * N * N), .AW(AW)) mem (
    .clk,
    .rd_req (mem_rd_req),  .rd_addr (mem_rd_addr), .rd_gnt (mem_rd_gnt),
    .rd_valid (mem_rd_valid), .rd_data (mem_rd_data),
    .wr_req (mem_wr_req),  .wr_addr (mem_wr_addr), .wr_data (mem_wr_data),
    .wr_gnt (mem_wr_gnt)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_t g[], expct[];
    longint t0, cycles;
    int nonzero = 0;
    coef.c1 = 32'h3f000000;   // 0.5
    coef.c2 = 32'h3f000000;
    coef.c3 = 32'h3f000000;
    coef.c4 = 32'h3f000000;
    g = new[N * N];
    for (int p = 0; p < N * N; p++) g[p] = '0;
    g[(N / 2) * N + N / 2].ez = 32'h3f800000;   // Ez = 1 at the centre
    for (int p = 0; p < N * N; p++) mem.mem[p] = g[p];
    expct = g;
    for (int k = 0; k < int'(ITERS); k++) iterate(expct, N, coef);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    max_iters = ITERS;
    start = 1'b1;
    t0 = mem.cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    cycles = mem.cyc - t0;
    $display("%0d iterations of a %0dx%0d grid in %0d cycles, %0d passes", ITERS, N, N, cycles, passes_done);
    checks += 2;
    if (passes_done != 2) begin
      failures++;
      $display("passes %0d expected 2", passes_done);
    end
    if (cycles < 2 * PASS || cycles > 2 * PASS + 40) begin
      failures++;
      $display("took %0d cycles, expected %0d..%0d", cycles, 2 * PASS, 2 * PASS + 40);
    end
    for (int p = 0; p < N * N; p++) begin
      checks++;
      if (mem.mem[int'(result_base) + p] !== expct[p]) begin
        failures++;
        if (failures < 10)
          $display("cell %0d: got %h expected %h", p, mem.mem[int'(result_base) + p], expct[p]);
      end
      if (expct[p] != '0) nonzero++;
    end
    // The wave must have spread: 48 iterations reach about 48 cells out.
    checks++;
    if (nonzero < 1000) begin
      failures++;
      $display("only %0d cells carry a field", nonzero);
    end
    $display("cells reached by the wave: %0d", nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
