// tb_pass_ctrl: checks the pass sequence for several iteration counts.
//
// With D = 4 PCMs and a 2 x 2 grid (buffer B at address 4), runs of 10, 8,
// 3 and 0 iterations are started; the testbench plays the writer,
// answering each pass_start with wr_done after a random delay. For every
// pass it checks the number of active PCMs (D, or the remainder in the
// last pass) and that source and destination alternate between the two
// buffers starting from A; at the end it checks the pass count, the single
// done pulse and result_base.
module tb_pass_ctrl;
  localparam int unsigned N = 2, D = 4, AW = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, wr_done = 1'b0;
  logic [31:0] max_iters = '0, passes_done;
  logic pass_start, busy, done;
  logic [AW-1:0] src_base, dst_base, result_base;
  logic [$clog2(D+1)-1:0] n_active;
  int checks = 0, failures = 0;

  pass_ctrl #(.N(N), .D(D), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(int iters);
    int passes = 0, left = iters, dones = 0;
    @(negedge clk);
    max_iters = iters;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (1) begin
      if (done) begin
        dones++;
        break;
      end
      if (pass_start) begin
        int exp_act = (left >= int'(D)) ? int'(D) : left;
        expect_eq("n_active", longint'(n_active), exp_act);
        expect_eq("src_base", longint'(src_base), (passes % 2) ? N * N : 0);
        expect_eq("dst_base", longint'(dst_base), (passes % 2) ? 0 : N * N);
        left -= exp_act;
        passes++;
        repeat ($urandom_range(1, 20)) @(negedge clk);
        wr_done = 1'b1;
        @(negedge clk);
        wr_done = 1'b0;
      end else begin
        @(negedge clk);
      end
    end
    expect_eq("passes", passes, (iters + D - 1) / D);
    expect_eq("passes_done", longint'(passes_done), (iters + D - 1) / D);
    expect_eq("result_base", longint'(result_base), (passes % 2) ? N * N : 0);
    @(negedge clk);
    expect_eq("busy after done", longint'(busy), 0);
    expect_eq("done pulse", longint'(done), 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(10);
    run(8);
    run(3);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
