// tb_fdtd_accel_full: one complete pass of the accelerator at its default
// size, a 1024 x 1024 grid through 44 PCMs (44 iterations).
//
// A random grid is loaded into the memory model, which grants every
// request and answers reads after 2 to 6 cycles. After done, all 1,048,576
// cells at result_base are compared bit for bit with the reference model
// iterated 44 times, and the run time is checked to be one cell per cycle
// plus the flush of the 44-module chain and a small start-up allowance.
module tb_fdtd_accel_full;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int unsigned N  = 1024;
  localparam int unsigned D  = 44;
  localparam int unsigned AW = $clog2(2 * N * N);
  localparam longint NPAD = longint'(D) * longint'(pcm_lat(N));

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
    repeat (1300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_t g[], expct[];
    longint t0, cycles;
    coef.c1 = 32'h3f000000;   // 0.5
    coef.c2 = 32'h3f000000;
    coef.c3 = 32'h3f000000;
    coef.c4 = 32'h3f000000;
    init_grid(g, N);
    for (int p = 0; p < N * N; p++) mem.mem[p] = g[p];
    expct = g;
    for (int k = 0; k < int'(D); k++) iterate(expct, N, coef);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    max_iters = D;
    start = 1'b1;
    t0 = mem.cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    cycles = mem.cyc - t0;
    $display("%0d iterations of a %0dx%0d grid in %0d cycles", D, N, N, cycles);
    checks++;
    if (cycles < longint'(N * N) + NPAD || cycles > longint'(N * N) + NPAD + 20) begin
      failures++;
      $display("took %0d cycles, expected %0d..%0d", cycles, longint'(N * N) + NPAD,
               longint'(N * N) + NPAD + 20);
    end
    for (int p = 0; p < N * N; p++) begin
      checks++;
      if (mem.mem[int'(result_base) + p] !== expct[p]) begin
        failures++;
        if (failures < 10)
          $display("cell %0d: got %h expected %h", p, mem.mem[int'(result_base) + p], expct[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
