// tb_grid_reader: checks the stream the reader makes from memory.
//
// A 4 x 4 grid is placed at an offset in the memory model, which grants
// requests at random and answers after random latencies. The consumer takes
// elements on random cycles. The testbench checks that exactly the 16 cells
// arrive in address order, marked valid, followed by exactly NPAD invalid
// flush elements, that done pulses once at the end, and that nothing is
// offered afterwards. Two runs use different base addresses.
module tb_grid_reader;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N = 4, NPAD = 5, FIFO = 4, AW = 6;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, take = 1'b0;
  logic [AW-1:0] base = '0, rd_addr;
  logic rd_req, rd_gnt, rd_valid, avail, busy, done;
  cell_t rd_data;
  elem_t out;
  int checks = 0, failures = 0;

  grid_reader #(.N(N), .NPAD(NPAD), .FIFO(FIFO), .AW(AW)) dut (.*);

  dram_model #(.WORDS(64), .AW(AW), .RD_PCT(50), .MIN_LAT(1), .MAX_LAT(8)) mem (
    .clk, .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .wr_req (1'b0), .wr_addr ('0), .wr_data ('0), .wr_gnt ()
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int b);
    int cells = 0, pads = 0, dones = 0;
    for (int k = 0; k < 64; k++) begin
      mem.mem[k].ez = rand_f(8);
      mem.mem[k].hx = 32'(k);
      mem.mem[k].hy = rand_f(8);
    end
    @(negedge clk);
    base  = AW'(b);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      take = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (done) dones++;
      if (take && avail) begin
        if (out.valid) begin
          checks++;
          if (pads != 0 || out.data !== mem.mem[b + cells]) begin
            failures++;
            $display("element %0d: got %h expected %h", cells, out.data, mem.mem[b + cells]);
          end
          cells++;
        end else begin
          pads++;
        end
      end
      @(negedge clk);
      if (done) dones++;
    end
    checks += 4;
    if (cells != N * N) begin failures++; $display("%0d cells, expected %0d", cells, N * N); end
    if (pads != NPAD)   begin failures++; $display("%0d flush elements, expected %0d", pads, NPAD); end
    if (dones != 2)     begin failures++; $display("done seen %0d half-cycles, expected one pulse", dones); end
    if (avail || busy)  begin failures++; $display("still busy after the stream"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(3);
    run(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
