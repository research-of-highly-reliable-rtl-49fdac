// tb_svpwm: random voltage vectors inside the linear range are compared
// with the sector / T1 / T2 / T0 dwell-time reference (tolerance 2 counts),
// the sector number is checked away from sector boundaries, and vectors
// beyond the linear range must give counts within 0..half.
module tb_svpwm;
  import apsoc_pkg::*;
  import tb_ref_pkg::*;
  cur_t ua, ub;
  cnt_t half, tu, tv, tw;
  logic [2:0] sec;
  int checks = 0, failures = 0;
  svpwm dut (.i_ualpha(ua), .i_ubeta(ub), .i_half(half), .o_tu(tu), .o_tv(tv), .o_tw(tw), .o_sector(sec));
  initial begin
    for (int n = 0; n < 1000; n++) begin
      real mag, ang, fu, fv, fw, ph;
      int rs;
      half = (n % 2) ? 16'd3333 : 16'd4167;
      mag  = 0.57 * real'($urandom_range(0, 1000)) / 1000.0;
      ang  = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
      ua = cur_t'($rtoi(mag * $cos(ang) * 32768.0));
      ub = cur_t'($rtoi(mag * $sin(ang) * 32768.0));
      #1;
      svm_ref(real'(ua)/32768.0, real'(ub)/32768.0, real'(half), fu, fv, fw, rs);
      checks++;
      if (absr(real'(tu)-fu) > 2.0 || absr(real'(tv)-fv) > 2.0 || absr(real'(tw)-fw) > 2.0) begin
        failures++;
        $display("FAIL ua=%0d ub=%0d t=%0d %0d %0d ref=%f %f %f", ua, ub, tu, tv, tw, fu, fv, fw);
      end
      ph = ang * 180.0 / PI;
      ph = ph - 60.0 * $floor(ph / 60.0);
      if (mag > 0.01 && ph > 1.0 && ph < 59.0) begin
        checks++;
        if (int'(sec) != rs) begin failures++; $display("FAIL sector %0d ref %0d ang=%f", sec, rs, ang); end
      end
    end
    // over-modulation: counts stay inside 0..half and the extreme phase pins
    half = 16'd3333; ua = 16'sd30000; ub = 16'sd0; #1;
    checks++;
    if (tu != half || tv != 0 || tw != 0) begin failures++; $display("FAIL overmod %0d %0d %0d", tu, tv, tw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
