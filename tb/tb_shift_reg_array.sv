// tb_shift_reg_array: checks push, pop and parallel taps of the
// shift-register array against a software queue of everything pushed.
// Shifts happen on random cycles; invalid pushes and the empty state after
// reset are checked through the tap valid bits.
module tb_shift_reg_array;
  localparam int unsigned W = 16, D = 13, NT = 4;
  localparam int unsigned TAPS [NT] = '{0, 1, 7, 12};

  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, din_valid = 1'b0;
  logic [W-1:0] din = '0;
  logic [W-1:0] tap_data [NT];
  logic         tap_valid [NT];
  int checks = 0, failures = 0;
  logic [W-1:0] hist_d [$];
  logic         hist_v [$];

  shift_reg_array #(.WIDTH(W), .DEPTH(D), .NTAP(NT), .TAP(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < NT; k++) begin
      logic       ev;
      logic [W-1:0] ed;
      ev = (TAPS[k] < hist_v.size()) ? hist_v[TAPS[k]] : 1'b0;
      checks++;
      if (tap_valid[k] !== ev) begin
        failures++;
        $display("tap %0d valid %b expected %b", k, tap_valid[k], ev);
      end
      if (ev) begin
        ed = hist_d[TAPS[k]];
        checks++;
        if (tap_data[k] !== ed) begin
          failures++;
          $display("tap %0d data %h expected %h", k, tap_data[k], ed);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      shift     = ($urandom_range(0, 3) != 0);
      din       = W'($urandom);
      din_valid = ($urandom_range(0, 5) != 0);
      @(posedge clk);
      if (shift) begin
        hist_d.push_front(din);
        hist_v.push_front(din_valid);
        if (hist_d.size() > D) begin
          void'(hist_d.pop_back());
          void'(hist_v.pop_back());
        end
      end
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
