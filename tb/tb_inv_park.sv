// tb_inv_park: checks the inverse Park transform with random rotor-frame voltages
// and angles against a floating-point rotation.
module tb_inv_park;
  import apsoc_pkg::*;
  import tb_ref_pkg::*;
  cur_t a, b, d, q;
  trig_t s, c;
  int checks = 0, failures = 0;
  inv_park dut (.i_ud(a), .i_uq(b), .i_sin(s), .i_cos(c), .o_ualpha(d), .o_ubeta(q));
  initial begin
    for (int n = 0; n < 500; n++) begin
      real th, rs, rc, rd, rq;
      th = 2.0 * PI * real'($urandom_range(0, 65535)) / 65536.0;
      rs = $sin(th); rc = $cos(th);
      s = trig_t'($rtoi(rs * 16384.0)); c = trig_t'($rtoi(rc * 16384.0));
      a = cur_t'($urandom_range(0, 40000)) - 16'sd20000;
      b = cur_t'($urandom_range(0, 40000)) - 16'sd20000;
      #1;
      rd = real'(a) * real'(c)/16384.0 - real'(b) * real'(s)/16384.0;
      rq = real'(a) * real'(s)/16384.0 + real'(b) * real'(c)/16384.0;
      rd = clampr(rd, -32768.0, 32767.0); rq = clampr(rq, -32768.0, 32767.0);
      checks++;
      if (absr(real'(d) - rd) > 1.0 || absr(real'(q) - rq) > 1.0) begin
        failures++;
        $display("FAIL a=%0d b=%0d th=%f d=%0d/%f q=%0d/%f", a, b, th, d, rd, q, rq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
