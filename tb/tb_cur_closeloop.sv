// tb_cur_closeloop: end-to-end check of one current-loop step.
// Random phase currents, angles, q commands and proportional gains are fed
// in; the expected d/q currents and compare counts come from a floating-point
// chain (Clarke, Park, P control, inverse Park, dwell-time SVPWM).  The
// latency from i_start to o_done must be 22 clocks.  A second phase uses a
// pure integral gain to check that the q voltage integrates, stops at the
// limit, and is cleared when i_en is low.
module tb_cur_closeloop;
  import apsoc_pkg::*;
  import tb_ref_pkg::*;
  localparam int LATENCY = 22;
  logic clk = 0, rst_n = 0, start = 0, en = 1, done, busy, pisat;
  cur_t iqref, iu, iv, id, iq;
  ang_t th;
  logic [15:0] kpd, kid, kpq, kiq, vlim;
  cnt_t half, tu, tv, tw;
  logic [2:0] sec;
  int checks = 0, failures = 0;

  cur_closeloop dut (.clk, .rst_n, .i_start(start), .i_en(en), .iv_cur(iqref), .iv_iu(iu), .iv_iv(iv),
    .iv_theta(th), .i_kp_d(kpd), .i_ki_d(kid), .i_kp_q(kpq), .i_ki_q(kiq), .i_v_limit(vlim),
    .i_half(half), .o_done(done), .ov_tu(tu), .ov_tv(tv), .ov_tw(tw), .ov_id(id), .ov_iq(iq),
    .ov_sector(sec), .o_busy(busy), .o_pi_sat(pisat));
  always #5 clk = !clk;

  task automatic run_step(output int cyc);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic check_duty(input real ua, input real ub, input real tol);
    real fu, fv, fw;
    int rs;
    svm_ref(ua/32768.0, ub/32768.0, real'(half), fu, fv, fw, rs);
    checks++;
    if (absr(real'(tu)-fu) > tol || absr(real'(tv)-fv) > tol || absr(real'(tw)-fw) > tol) begin
      failures++;
      $display("FAIL duty t=%0d %0d %0d ref=%f %f %f", tu, tv, tw, fu, fv, fw);
    end
  endtask

  initial begin
    iqref = 0; iu = 0; iv = 0; th = 0; kpd = 256; kid = 0; kpq = 256; kiq = 0;
    vlim = 18918; half = 3333;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      real s, c, a, b, rd, rq, ud, uq, ua, ub;
      int cyc;
      iu    = cur_t'($urandom_range(0, 6000)) - 16'sd3000;
      iv    = cur_t'($urandom_range(0, 6000)) - 16'sd3000;
      iqref = cur_t'($urandom_range(0, 6000)) - 16'sd3000;
      th    = ang_t'($urandom);
      kpd   = 16'($urandom_range(64, 512));
      kpq   = 16'($urandom_range(64, 512));
      run_step(cyc);
      checks++;
      if (cyc != LATENCY) begin failures++; $display("FAIL latency %0d", cyc); end
      s  = $sin(2.0*PI*real'(th)/65536.0);
      c  = $cos(2.0*PI*real'(th)/65536.0);
      a  = real'(iu);
      b  = (real'(iu) + 2.0*real'(iv)) / $sqrt(3.0);
      rd = a*c + b*s;
      rq = -a*s + b*c;
      checks++;
      if (absr(real'(id)-rd) > 3.0 || absr(real'(iq)-rq) > 3.0) begin
        failures++; $display("FAIL dq id=%0d/%f iq=%0d/%f", id, rd, iq, rq);
      end
      ud = clampr(-rd * real'(kpd) / 256.0, -real'(vlim), real'(vlim));
      uq = clampr((real'(iqref) - rq) * real'(kpq) / 256.0, -real'(vlim), real'(vlim));
      ua = ud*c - uq*s;
      ub = ud*s + uq*c;
      check_duty(ua, ub, 4.0);
    end
    // integral action on the q axis at theta = 0: U_beta = Uq
    kpd = 0; kpq = 0; kid = 0; kiq = 4096; iu = 0; iv = 0; th = 0; iqref = 16'sd5000;
    en = 0; @(negedge clk); en = 1;
    for (int k = 1; k <= 5; k++) begin
      int cyc;
      run_step(cyc);
      check_duty(0.0, clampr(5000.0 * k, 0.0, 18918.0), 3.0);
    end
    checks++;
    if (!pisat) begin failures++; $display("FAIL no PI saturation flag"); end
    // disabling clears the integrator: zero voltage gives half/2 on every phase
    en = 0;
    begin int cyc; run_step(cyc); end
    checks++;
    if (tu != half/2 && tu != half/2 + 1) begin failures++; $display("FAIL disable tu=%0d", tu); end
    check_duty(0.0, 0.0, 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
