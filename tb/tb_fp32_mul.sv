// tb_fp32_mul: self-checking test of the single-precision multiplier.
//
// Applies random operand pairs over a range of exponents, both signs, and
// directed cases (rounding ties, zeros, infinities, NaN, overflow,
// underflow to zero), comparing every result bit for bit with the
// double-precision reference of fp_ref_pkg.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] fixed_exp = 32'h0, bit use_fixed = 1'b0);
    a = ta; b = tb_;
    #1;
    exp_y = use_fixed ? fixed_exp : fmul(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h * %h: got %h expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] ra, rb;
    check(32'h3f800000, 32'h40000000);                      // 1 * 2
    check(32'h3fc00000, 32'h3fc00000);                      // 1.5 * 1.5
    check(32'h3f800001, 32'h3f800001);                      // rounding of a tiny excess
    check(32'h00000000, 32'hc0000000);                      // 0 * -2 = -0
    check(32'h7f800000, 32'h00000000, 32'h7fc00000, 1'b1);  // inf * 0 = NaN
    check(32'h7f800000, 32'hbf800000, 32'hff800000, 1'b1);  // inf * -1
    check(32'h7f000000, 32'h7f000000);                      // overflow
    check(32'h00800000, 32'h3f000000);                      // underflow flushes
    for (int n = 0; n < 60000; n++) begin
      ra = rand_f((n % 2) ? 60 : 5);
      rb = rand_f((n % 3) ? 60 : 5);
      ra[31] = 1'($urandom);
      rb[31] = 1'($urandom);
      check(ra, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
