// tb_sync_fifo: random pushes and pops against a software queue. Checks
// the head word, count, empty and full after every cycle, and that pushes
// into a full FIFO (even with a pop in the same cycle) and pops from an
// empty one are ignored.
module tb_sync_fifo;
  localparam int unsigned W = 12, DEPTH = 5;

  logic clk = 1'b0, rst_n = 1'b0, push = 1'b0, pop = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      push = ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < 50);
      din  = W'($urandom);
      @(posedge clk);
      begin
        automatic bit was_full = (q.size() == DEPTH);
        if (pop && q.size() != 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
      #1;
      checks++;
      if (int'(count) != q.size() || empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++;
        $display("count %0d empty %b full %b, expected %0d", count, empty, full, q.size());
      end
      if (q.size() != 0) begin
        checks++;
        if (dout !== q[0]) begin
          failures++;
          $display("head %h expected %h", dout, q[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
