// tb_pwm_gen: checks the PWM timer.  Per period (between interrupts) it
// counts the on-clocks of every gate output and compares them with
// 2*cmp - dead (high side) and 2*(half - cmp) - dead (low side); checks the
// interrupt spacing of 2*half clocks (6666 clocks = 15 kHz at 100 MHz for the
// default half period), that the two switches of a leg are never on
// together, that compare values written mid-period only act from the next
// period, and that i_en low turns every output off.
module tb_pwm_gen;
  import apsoc_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, latch = 0, irq;
  cnt_t tu, tv, tw, half, dead;
  logic up, un, vp, vn, wp, wn;
  int checks = 0, failures = 0;
  int cnt_on [6];
  int last_irq, period;
  int cyc = 0;
  pwm_gen dut (.clk, .rst_n, .i_en(en), .i_data_latch(latch), .iv_tu(tu), .iv_tv(tv), .iv_tw(tw),
               .i_half(half), .i_dead(dead), .o_intrrupt(irq),
               .o_pwm_up(up), .o_pwm_un(un), .o_pwm_vp(vp), .o_pwm_vn(vn), .o_pwm_wp(wp), .o_pwm_wn(wn));
  always #5 clk = !clk;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && ((up && un) || (vp && vn) || (wp && wn))) begin
      failures++; $display("FAIL shoot-through at %0d", cyc);
    end
  end

  task automatic load(input int a, input int b, input int c);
    @(negedge clk);
    tu = cnt_t'(a); tv = cnt_t'(b); tw = cnt_t'(c); latch = 1;
    @(negedge clk) latch = 0;
  endtask

  // measure one full period; returns on-counts of the 6 outputs
  task automatic measure();
    for (int i = 0; i < 6; i++) cnt_on[i] = 0;
    @(posedge clk iff irq);
    period = 0;
    do begin
      @(posedge clk);
      period++;
      cnt_on[0] += int'(up); cnt_on[1] += int'(un); cnt_on[2] += int'(vp);
      cnt_on[3] += int'(vn); cnt_on[4] += int'(wp); cnt_on[5] += int'(wn);
    end while (!irq);
  endtask

  task automatic expect_counts(input int h, input int d, input int a, input int b, input int c);
    int cmp [3];
    cmp[0] = a; cmp[1] = b; cmp[2] = c;
    checks++;
    if (period != 2*h) begin failures++; $display("FAIL period %0d", period); end
    for (int i = 0; i < 3; i++) begin
      int eh, el;
      eh = 2*cmp[i] - d; if (eh < 0) eh = 0;
      el = 2*(h - cmp[i]) - d; if (el < 0) el = 0;
      if (cmp[i] == h) eh = 2*h;
      if (cmp[i] == 0) el = 2*h;
      checks++;
      if (cnt_on[2*i] != eh || cnt_on[2*i+1] != el) begin
        failures++;
        $display("FAIL phase %0d cmp=%0d hi=%0d/%0d lo=%0d/%0d", i, cmp[i], cnt_on[2*i], eh, cnt_on[2*i+1], el);
      end
    end
  endtask

  initial begin
    tu = 0; tv = 0; tw = 0; half = 50; dead = 5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(10, 25, 40);
    measure();  // period in which the new values are applied
    measure(); expect_counts(50, 5, 10, 25, 40);
    // extremes: always on, always off
    load(50, 0, 30);
    measure(); measure(); expect_counts(50, 5, 50, 0, 30);
    // double buffering: a latch in mid-period does not change this period
    @(posedge clk iff irq);
    repeat (30) @(posedge clk);
    load(20, 20, 20);
    for (int i = 0; i < 6; i++) cnt_on[i] = 0;
    period = 0;
    // remaining part of the period must still use (50,0,30): up stays on
    do begin @(posedge clk); period++; cnt_on[0] += int'(up); end while (!irq);
    checks++;
    if (cnt_on[0] != period) begin failures++; $display("FAIL buffer %0d of %0d", cnt_on[0], period); end
    measure(); expect_counts(50, 5, 20, 20, 20);
    // disable
    en = 0;
    measure();
    checks++;
    if (cnt_on[0] + cnt_on[1] + cnt_on[2] + cnt_on[3] + cnt_on[4] + cnt_on[5] != 0) begin
      failures++; $display("FAIL outputs while disabled");
    end
    en = 1;
    // default switching frequency: 100 MHz / 6666 = 15 kHz, dead time 1 us
    half = 3333; dead = 100;
    load(1000, 1666, 3000);
    measure(); measure(); measure(); expect_counts(3333, 100, 1000, 1666, 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
