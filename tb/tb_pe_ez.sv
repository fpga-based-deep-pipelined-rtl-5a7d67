// tb_pe_ez: streams random cells through the electric-field PE with random
// stalls and checks each result against Eq. (1) evaluated by the reference
// model, including cells with upd = 0 that must pass Ez through. It also
// checks that every result appears exactly PE_EZ_LAT enabled steps after
// its inputs, and one result per enabled step once the pipe is full.
module tb_pe_ez;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0, upd = 1'b0;
  fp32_t ez, hx, hx_s, hy, hy_w, c1, c2, ez_out;
  logic out_valid;
  int checks = 0, failures = 0;
  fp32_t exp_q [$];
  int    step_q [$];
  int    step = 0;

  pe_ez dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ez = '0; hx = '0; hx_s = '0; hy = '0; hy_w = '0;
    c1 = 32'h3f000000; c2 = 32'h3ec00000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      en       = (n > 5000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_valid = (n < 5900);
      upd      = ($urandom_range(0, 4) != 0);
      ez = rand_f(6); hx = rand_f(6); hx_s = rand_f(6); hy = rand_f(6); hy_w = rand_f(6);
      ez[31] = 1'($urandom); hx_s[31] = 1'($urandom); hy_w[31] = 1'($urandom);
      @(posedge clk);
      if (en) begin
        step++;
        if (in_valid) begin
          exp_q.push_back(upd ? fadd(fsub(ez, fmul(c1, fsub(hx, hx_s))), fmul(c2, fsub(hy, hy_w)))
                              : ez);
          step_q.push_back(step);
        end
        #1;
        if (out_valid) begin
          fp32_t e;
          int s;
          checks++;
          if (exp_q.size() == 0) begin
            failures++;
            $display("unexpected output");
          end else begin
            e = exp_q.pop_front();
            s = step_q.pop_front();
            if (ez_out !== e) begin
              failures++;
              if (failures < 10) $display("ez_out %h expected %h", ez_out, e);
            end
            checks++;
            if (step - s + 1 != int'(PE_EZ_LAT)) begin
              failures++;
              if (failures < 10) $display("latency %0d expected %0d", step - s + 1, PE_EZ_LAT);
            end
          end
        end
      end
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results never came out", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
