// tb_zero_drift: feeds noisy samples around fixed offsets, starts a
// calibration and checks the learned offsets (mean of 64 samples), the
// calibration-done flag, the offset-corrected outputs one clock after
// i_valid, and saturation of the correction.
module tb_zero_drift;
  import apsoc_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0, cal = 0, ovalid, done;
  cur_t c1, c2, u, v, o1, o2;
  int checks = 0, failures = 0;
  zero_drift #(.CAL_LOG2(6)) dut (.clk, .rst_n, .i_valid(valid), .i_cal(cal), .iv_ch1(c1), .iv_ch2(c2),
    .o_valid(ovalid), .ov_iu(u), .ov_iv(v), .o_cal_done(done), .ov_off1(o1), .ov_off2(o2));
  always #5 clk = !clk;
  task automatic sample(input cur_t a, input cur_t b);
    @(negedge clk) begin c1 = a; c2 = b; valid = 1; end
    @(negedge clk) valid = 0;
  endtask
  initial begin
    int s1, s2;
    c1 = 0; c2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // before calibration: pass through
    sample(16'sd123, -16'sd77);
    checks++; if (u != 16'sd123 || v != -16'sd77) begin failures++; $display("FAIL passthrough"); end
    @(negedge clk) cal = 1;
    @(negedge clk);
    checks++; if (done) begin failures++; $display("FAIL done early"); end
    s1 = 0; s2 = 0;
    for (int n = 0; n < 64; n++) begin
      int a, b;
      a = 250 + $urandom_range(0, 40) - 20;
      b = -180 + $urandom_range(0, 40) - 20;
      s1 += a; s2 += b;
      sample(cur_t'(a), cur_t'(b));
    end
    @(negedge clk);
    checks++;
    if (!done || o1 != cur_t'(s1 >>> 6) || o2 != cur_t'(s2 >>> 6)) begin
      failures++; $display("FAIL offsets %0d %0d exp %0d %0d done=%0d", o1, o2, s1 >>> 6, s2 >>> 6, done);
    end
    for (int n = 0; n < 100; n++) begin
      int a, b;
      a = $urandom_range(0, 20000) - 10000;
      b = $urandom_range(0, 20000) - 10000;
      @(negedge clk) begin c1 = cur_t'(a); c2 = cur_t'(b); valid = 1; end
      @(posedge clk); #1;
      checks++;
      if (!ovalid || u != cur_t'(a - (s1 >>> 6)) || v != cur_t'(b - (s2 >>> 6))) begin
        failures++; $display("FAIL correct %0d %0d", u, v);
      end
      @(negedge clk) valid = 0;
    end
    sample(-16'sd32768, 16'sd32767);
    checks++;
    if (u != -16'sd32768 || v != 16'sd32767) begin failures++; $display("FAIL saturation %0d %0d", u, v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
