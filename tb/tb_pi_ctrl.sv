// tb_pi_ctrl: drives the PI regulator with random references, feedbacks,
// gains and limits and compares each update with a floating-point model of
// out = clamp(Kp*e + I), I = clamp(I + Ki*e) (Kp in Q8.8, Ki in Q4.12).
// Also checks that outputs saturate at the limit, that the integrator does
// not wind up past it, and that i_clr empties it.
module tb_pi_ctrl;
  import apsoc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, upd = 0, sat;
  cur_t r, fb, out;
  logic [15:0] kp, ki, lim;
  int checks = 0, failures = 0, sat_seen = 0;
  real integ;
  pi_ctrl dut (.clk, .rst_n, .i_clr(clr), .i_update(upd), .i_ref(r), .i_fb(fb),
               .i_kp(kp), .i_ki(ki), .i_limit(lim), .o_out(out), .o_sat(sat));
  always #5 clk = !clk;

  task automatic step(input real tol);
    real e, o, l;
    @(negedge clk) upd = 1;
    @(negedge clk) upd = 0;
    e = real'(r) - real'(fb);
    l = real'(lim);
    integ = clampr(integ + e * real'(ki) / 4096.0, -l, l);
    o = clampr(e * real'(kp) / 256.0 + integ, -l, l);
    checks++;
    if (absr(real'(out) - o) > tol) begin
      failures++;
      $display("FAIL e=%f kp=%0d ki=%0d out=%0d ref=%f", e, kp, ki, out, o);
    end
    if (sat) sat_seen++;
  endtask

  initial begin
    integ = 0.0;
    r = 0; fb = 0; kp = 256; ki = 0; lim = 18918;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      r   = cur_t'($urandom_range(0, 4000)) - 16'sd2000;
      fb  = cur_t'($urandom_range(0, 4000)) - 16'sd2000;
      kp  = 16'($urandom_range(0, 1024));
      ki  = 16'($urandom_range(0, 400));
      step(2.0);
    end
    // constant error: integrator must run into the limit and stop there
    r = 16'sd3000; fb = 0; kp = 0; ki = 4096; lim = 10000;
    for (int n = 0; n < 8; n++) step(2.0);
    checks++;
    if (out != 16'sd10000 || !sat) begin failures++; $display("FAIL limit %0d", out); end
    // reversing the error must leave the limit after one step (no wind-up)
    r = -16'sd3000;
    step(2.0);
    checks++;
    if (out != 16'sd7000) begin failures++; $display("FAIL windup %0d", out); end
    // clear
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    integ = 0.0;
    checks++;
    if (out != 0) begin failures++; $display("FAIL clear"); end
    r = 16'sd100; kp = 0; ki = 4096;
    step(1.0);
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
