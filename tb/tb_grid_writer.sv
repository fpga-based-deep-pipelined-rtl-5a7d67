// tb_grid_writer: checks that the writer stores every pushed cell at the
// right address in order, under random write grants.
//
// Cells are offered on random cycles whenever ready is high; the memory
// model grants writes half of the time, so the FIFO fills and ready drops
// (checked to happen). After done the 16 words at base must equal the
// pushed cells, done must have pulsed once, and a word just past the grid
// must be untouched.
module tb_grid_writer;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N = 4, FIFO = 4, AW = 6;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, push = 1'b0;
  logic [AW-1:0] base = '0, wr_addr;
  cell_t din = '0, wr_data;
  logic ready, wr_req, wr_gnt, busy, done;
  int checks = 0, failures = 0;
  int n_full = 0;

  grid_writer #(.N(N), .FIFO(FIFO), .AW(AW)) dut (.*);

  dram_model #(.WORDS(64), .AW(AW), .WR_PCT(35)) mem (
    .clk, .rd_req (1'b0), .rd_addr ('0), .rd_gnt (), .rd_valid (), .rd_data (),
    .wr_req, .wr_addr, .wr_data, .wr_gnt
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
    cell_t sent[$];
    int dones = 0;
    cell_t guard;
    for (int k = 0; k < 64; k++) mem.mem[k] = '0;
    guard = {rand_f(3), rand_f(3), rand_f(3)};
    mem.mem[b + N * N] = guard;
    @(negedge clk);
    base  = AW'(b);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      push = (sent.size() < N * N) && ready && ($urandom_range(0, 3) != 0);
      din  = {rand_f(5), rand_f(5), rand_f(5)};
      if (!ready) n_full++;
      @(posedge clk);
      if (done) dones++;
      if (push) sent.push_back(din);
      @(negedge clk);
      push = 1'b0;
    end
    for (int k = 0; k < N * N; k++) begin
      checks++;
      if (k >= sent.size() || mem.mem[b + k] !== sent[k]) begin
        failures++;
        $display("word %0d: got %h", k, mem.mem[b + k]);
      end
    end
    checks += 3;
    if (dones != 1) begin failures++; $display("done pulsed %0d times", dones); end
    if (busy)       begin failures++; $display("still busy"); end
    if (mem.mem[b + N * N] !== guard) begin failures++; $display("wrote past the grid"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(5);
    run(33);
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
