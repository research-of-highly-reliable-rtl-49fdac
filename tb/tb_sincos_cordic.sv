// tb_sincos_cordic: sweeps the angle over the full turn and compares the
// CORDIC sine and cosine with $sin/$cos (tolerance 3 LSB of Q2.14); also
// checks that o_done comes exactly ITER+1 clocks after i_start.
module tb_sincos_cordic;
  import apsoc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  ang_t th;
  trig_t s, c;
  int checks = 0, failures = 0;
  localparam int ITER = 16;
  sincos_cordic #(.ITER(ITER)) dut (.clk, .rst_n, .i_start(start), .i_theta(th), .o_done(done), .o_sin(s), .o_cos(c));
  always #5 clk = !clk;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 700; n++) begin
      int cyc;
      real rs, rc;
      th = (n < 600) ? ang_t'(n * 109 + n / 7) : ang_t'($urandom);
      if (n == 600) th = 16'd16384;     // exactly 90 degrees
      if (n == 601) th = 16'd49152;     // exactly 270 degrees
      if (n == 602) th = 16'd32768;     // 180 degrees
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      rs = 16384.0 * $sin(2.0*PI*real'(th)/65536.0);
      rc = 16384.0 * $cos(2.0*PI*real'(th)/65536.0);
      checks++;
      if (absr(real'(s) - rs) > 3.0 || absr(real'(c) - rc) > 3.0) begin
        failures++;
        $display("FAIL th=%0d sin=%0d/%f cos=%0d/%f", th, s, rs, c, rc);
      end
      checks++;
      if (cyc != ITER + 1) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
