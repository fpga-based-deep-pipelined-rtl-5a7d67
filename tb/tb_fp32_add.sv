// tb_fp32_add: self-checking test of the single-precision adder/subtractor.
//
// Applies random operand pairs (wide and narrow exponent ranges, nearly
// equal magnitudes for cancellation, zeros, infinities, both signs, add and
// subtract) and compares every result bit for bit with the double-precision
// reference of fp_ref_pkg. A watchdog ends the run if it hangs.
module tb_fp32_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  logic        sub;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp32_add dut (.a(a), .b(b), .sub(sub), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic tsub);
    a = ta; b = tb_; sub = tsub;
    #1;
    exp_y = tsub ? fsub(ta, tb_) : fadd(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h %s %h: got %h expected %h", ta, tsub ? "-" : "+", tb_, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] ra, rb;
    // Directed cases.
    check(32'h3f800000, 32'h3f800000, 1'b0);   // 1 + 1
    check(32'h3f800000, 32'h3f800000, 1'b1);   // 1 - 1 = +0
    check(32'h3f800000, 32'h33800000, 1'b0);   // tie, rounds to even
    check(32'h3f800001, 32'h33800000, 1'b0);   // tie, rounds up to even
    check(32'h3f800000, 32'h33800001, 1'b0);   // above tie
    check(32'h00000000, 32'h80000000, 1'b0);   // +0 + -0
    check(32'h80000000, 32'h80000000, 1'b0);   // -0 + -0
    check(32'h00000000, 32'h40490fdb, 1'b1);   // 0 - pi
    check(32'h7f800000, 32'h3f800000, 1'b0);   // inf + 1
    check(32'h7f800000, 32'h7f800000, 1'b1);   // inf - inf = NaN
    check(32'h7f7fffff, 32'h7f7fffff, 1'b0);   // overflow to inf
    check(32'h3f800000, 32'h3f7fffff, 1'b1);   // massive cancellation
    for (int n = 0; n < 60000; n++) begin
      case (n % 4)
        0: begin ra = rand_f(20); rb = rand_f(20); end
        1: begin ra = rand_f(2);  rb = rand_f(2);  end
        2: begin ra = rand_f(10); rb = ra ^ (32'($urandom) & 32'h0000_00ff); end
        default: begin ra = rand_f(30); rb = rand_f(1); end
      endcase
      ra[31] = 1'($urandom);
      rb[31] = 1'($urandom);
      check(ra, rb, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
