// tb_pcm: runs whole grids through one pipelined computation module.
//
// A small N x N grid of random fields is streamed in scan order with
// random stalls (adv = 0), followed by invalid flush elements. Every cell
// that comes out is compared bit for bit with one iteration of the
// reference model, and the number of steps each cell spends inside (plus
// the step that hands it on) is compared with pcm_lat(N). Three passes are run back to back: active,
// idle (cells must come out unchanged) and active again, which also checks
// that the cell counters wrap correctly between passes.
module tb_pcm;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int unsigned N = 8;

  logic  clk = 1'b0, rst_n = 1'b0, adv = 1'b0, active = 1'b0;
  coef_t coef;
  elem_t in, out;
  int checks = 0, failures = 0;
  int step = 0;

  pcm #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(bit act);
    cell_t g[], expct[];
    int    in_step[];
    int    sent = 0, got = 0, flush = 0;
    init_grid(g, N);
    expct = g;
    if (act) iterate(expct, N, coef);
    in_step = new[N * N];
    active = act;
    while (got < N * N && flush < 4 * int'(pcm_lat(N))) begin
      @(negedge clk);
      adv = ($urandom_range(0, 3) != 0);
      if (sent < N * N) begin
        in.valid = 1'b1;
        in.data  = g[sent];
      end else begin
        in.valid = 1'b0;
        in.data  = '0;
      end
      @(posedge clk);
      if (adv) begin
        step++;
        if (sent < N * N) begin
          in_step[sent] = step;
          sent++;
        end else begin
          flush++;
        end
        #1;
        if (out.valid) begin
          checks++;
          if (out.data !== expct[got]) begin
            failures++;
            if (failures < 10)
              $display("pass act=%0d cell %0d: got %h expected %h", act, got, out.data, expct[got]);
          end
          checks++;
          if (step - in_step[got] + 1 != int'(pcm_lat(N))) begin
            failures++;
            if (failures < 10)
              $display("cell %0d latency %0d expected %0d", got, step - in_step[got] + 1, pcm_lat(N));
          end
          got++;
        end
      end
    end
    checks++;
    if (got != N * N) begin
      failures++;
      $display("only %0d of %0d cells came out", got, N * N);
    end
  endtask

  initial begin
    coef.c1 = 32'h3f000000;  // 0.5
    coef.c2 = 32'h3f000000;
    coef.c3 = 32'h3f000000;
    coef.c4 = 32'h3f000000;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_pass(1'b1);
    run_pass(1'b0);
    coef.c1 = 32'h3e99999a;  // 0.3
    coef.c2 = 32'h3ecccccd;  // 0.4
    coef.c3 = 32'h3f19999a;  // 0.6
    coef.c4 = 32'h3e4ccccd;  // 0.2
    run_pass(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
