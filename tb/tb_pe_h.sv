// tb_pe_h: streams random cells through a magnetic-field PE with random
// stalls and checks each result against Eqs. (2)/(3), H - C*(Ez_far -
// Ez_near), from the reference model, including pass-through cells with
// upd = 0, and that each result appears exactly PE_H_LAT enabled steps
// after its inputs.
module tb_pe_h;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0, upd = 1'b0;
  fp32_t h, e_far, e_near, c, h_out;
  logic out_valid;
  int checks = 0, failures = 0;
  fp32_t exp_q [$];
  int    step_q [$];
  int    step = 0;

  pe_h dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = '0; e_far = '0; e_near = '0;
    c = 32'h3f2a3b4c;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      en       = (n > 5000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_valid = (n < 5900);
      upd      = ($urandom_range(0, 4) != 0);
      h = rand_f(6); e_far = rand_f(6); e_near = rand_f(6);
      h[31] = 1'($urandom); e_near[31] = 1'($urandom);
      @(posedge clk);
      if (en) begin
        step++;
        if (in_valid) begin
          exp_q.push_back(upd ? fsub(h, fmul(c, fsub(e_far, e_near))) : h);
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
            if (h_out !== e) begin
              failures++;
              if (failures < 10) $display("h_out %h expected %h", h_out, e);
            end
            checks++;
            if (step - s + 1 != int'(PE_H_LAT)) begin
              failures++;
              if (failures < 10) $display("latency %0d expected %0d", step - s + 1, PE_H_LAT);
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
