// tb_apsoc_servo_top: end-to-end test of the coprocessor at its default
// parameters (100 MHz / 50 MHz clocks, 15 kHz PWM), with behavioural models
// of the AD7606 and AD2S1210 and an AXI4-Lite master standing in for the
// processor.  It goes through:
//   1. interrupt period at the default 15 kHz;
//   2. zero-drift calibration with only sensor offsets present;
//   3. closed-loop steps: d/q currents and compare counts read over AXI are
//      checked against a floating-point model, and the measured high-side
//      on-time of phase U against 2*tu - dead;
//   4. PI limiting with a large q command;
//   5. an overcurrent trip (gates off) and the fault clear;
//   6. switching-frequency changes to 10, 12 and 15 kHz.
// Every mechanism is counted and a failure is counted for any that never
// happened.
module tb_apsoc_servo_top;
  import apsoc_pkg::*;
  import tb_ref_pkg::*;

  logic clk_100 = 0, clk_50 = 0, rst_n = 0;
  logic [7:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  logic irq, fault, up, un, vp, vn, wp, wn;
  logic [15:0] adc_db, raw1, raw2, angle, cmd_rx;
  logic adc_busy, adc_cs_n, adc_rd_n, adc_convst;
  logic rdc_miso, rdc_cs_n, rdc_fsync_n, rdc_sclk, rdc_mosi;
  int convs, reads;
  int checks = 0, failures = 0;

  apsoc_servo_top dut (
    .clk_100, .clk_50, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready), .s_axi_wdata(wdata),
    .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_bresp(bresp),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_araddr(araddr), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid),
    .s_axi_rready(rready),
    .o_intrrupt(irq), .o_fault(fault),
    .o_pwm_up(up), .o_pwm_un(un), .o_pwm_vp(vp), .o_pwm_vn(vn), .o_pwm_wp(wp), .o_pwm_wn(wn),
    .adc_data(adc_db), .adc_busy, .adc_cs_n, .adc_rd_n, .adc_convst,
    .rdc_miso, .rdc_cs_n, .rdc_fsync_n, .rdc_sclk, .rdc_mosi
  );

  ad7606_model #(.CONV_NS(2000)) adc (.convst(adc_convst), .cs_n(adc_cs_n), .rd_n(adc_rd_n),
    .ch1(raw1), .ch2(raw2), .no_busy_fall(1'b0), .busy(adc_busy), .db(adc_db), .conversions(convs));
  ad2s1210_model rdc (.cs_n(rdc_cs_n), .fsync_n(rdc_fsync_n), .sclk(rdc_sclk), .sdi(rdc_mosi),
    .angle, .sdo(rdc_miso), .cmd_rx(cmd_rx), .reads(reads));

  always #5 clk_100 = !clk_100;
  initial begin #3; forever #10 clk_50 = !clk_50; end

  // ---------------- mechanism counters ----------------
  int n_irq = 0, n_shoot = 0, n_dead = 0, n_off_fault = 0;
  int n_cal = 0, n_loop = 0, n_pisat = 0, n_trip = 0, n_clear = 0, n_freq = 0;
  always @(posedge clk_100) begin
    if (irq) n_irq++;
    if ((up && un) || (vp && vn) || (wp && wn)) n_shoot++;
    if (rst_n && !fault && dut.drive_en && !up && !un) n_dead++;
    if (fault && (up || un || vp || vn || wp || wn)) n_off_fault++;
  end

  // ---------------- AXI master ----------------
  task automatic axi_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk_100);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hf; wvalid = 1;
    @(posedge clk_100 iff (awready && wready));
    @(negedge clk_100) begin awvalid = 0; wvalid = 0; bready = 1; end
    while (!bvalid) @(negedge clk_100);
    @(negedge clk_100) bready = 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk_100);
    araddr = a; arvalid = 1;
    @(posedge clk_100 iff arready);
    @(negedge clk_100) begin arvalid = 0; rready = 1; end
    while (!rvalid) @(negedge clk_100);
    d = rdata;
    @(negedge clk_100) rready = 0;
  endtask

  task automatic wait_irqs(input int n);
    repeat (n) @(posedge clk_100 iff irq);
  endtask

  // interrupt spacing in clk_100 cycles
  task automatic irq_period(output int p);
    @(posedge clk_100 iff irq);
    p = 0;
    do begin @(posedge clk_100); p++; end while (!irq);
  endtask

  // one loop step checked against the floating-point model
  task automatic check_step(input int iu_net, input int iv_net, input int th, input int iqr,
                            input int kp, input int half, input int dead);
    logic [31:0] r;
    real s, c, a, b, rd, rq, ud, uq, fu, fv, fw;
    int rs, hi;
    s  = $sin(2.0*PI*real'(th)/65536.0);
    c  = $cos(2.0*PI*real'(th)/65536.0);
    a  = real'(iu_net);
    b  = (real'(iu_net) + 2.0*real'(iv_net)) / $sqrt(3.0);
    rd = a*c + b*s;
    rq = -a*s + b*c;
    ud = clampr(-rd*kp/256.0, -18918.0, 18918.0);
    uq = clampr((iqr - rq)*kp/256.0, -18918.0, 18918.0);
    svm_ref((ud*c - uq*s)/32768.0, (ud*s + uq*c)/32768.0, real'(half), fu, fv, fw, rs);
    axi_read(8'h4c, r);
    checks++;
    if (absr(real'(cur_t'(r[15:0])) - rd) > 3.0 || absr(real'(cur_t'(r[31:16])) - rq) > 3.0) begin
      failures++; $display("FAIL dq %0d %0d exp %f %f", cur_t'(r[15:0]), cur_t'(r[31:16]), rd, rq);
    end
    axi_read(8'h50, r);
    checks++;
    if (absr(real'(r[15:0]) - fu) > 4.0 || absr(real'(r[31:16]) - fv) > 4.0) begin
      failures++; $display("FAIL tu/tv %0d %0d exp %f %f", r[15:0], r[31:16], fu, fv);
    end
    begin
      logic [31:0] r2;
      axi_read(8'h54, r2);
      checks++;
      if (absr(real'(r2[15:0]) - fw) > 4.0) begin failures++; $display("FAIL tw %0d exp %f", r2[15:0], fw); end
    end
    // measured on-time of the U high side over one whole period
    @(posedge clk_100 iff irq);
    hi = 0;
    do begin @(posedge clk_100); hi += int'(up); end while (!irq);
    checks++;
    if (hi != 2*int'(r[15:0]) - dead && !(r[15:0] == 16'(half) && hi == 2*half)) begin
      failures++; $display("FAIL U on-time %0d exp %0d", hi, 2*int'(r[15:0]) - dead);
    end
    n_loop++;
  endtask

  initial begin
    logic [31:0] r, cnt0;
    int p;
    raw1 = 16'sd200; raw2 = -16'sd150; angle = 16'd0;
    repeat (5) @(posedge clk_100);
    rst_n = 1;

    // 1. default switching frequency 15 kHz: 6666 clocks of 100 MHz
    irq_period(p);
    checks++;
    if (p != 6666) begin failures++; $display("FAIL default period %0d", p); end

    // 2. zero-drift calibration (drive off, only offsets on the sensors)
    axi_write(8'h00, 32'h2);
    do begin wait_irqs(8); axi_read(8'h40, r); end while (!r[4]);
    n_cal++;
    wait_irqs(2);
    axi_read(8'h44, r);
    checks++;
    if (r != 32'h0) begin failures++; $display("FAIL offset not removed %h", r); end

    // 3. closed-loop steps, P only
    axi_write(8'h0c, 32'd0);          // Ki_d = 0
    axi_write(8'h14, 32'd0);          // Ki_q = 0
    axi_write(8'h04, 32'd1500);       // iq command
    axi_write(8'h00, 32'h3);          // run (cal stays high: no new calibration)
    axi_read(8'h58, cnt0);
    for (int n = 0; n < 4; n++) begin
      int iu_n, iv_n, th;
      iu_n = $urandom_range(0, 4000) - 2000;
      iv_n = $urandom_range(0, 4000) - 2000;
      th   = $urandom_range(0, 65535);
      raw1 = 16'(iu_n + 200); raw2 = 16'(iv_n - 150); angle = 16'(th);
      wait_irqs(3);
      check_step(iu_n, iv_n, th, 1500, 256, 3333, 100);
    end
    axi_read(8'h48, r);
    checks++;
    if (r[15:0] != angle) begin failures++; $display("FAIL theta %h", r[15:0]); end
    axi_read(8'h58, r);
    checks++;
    if (r - cnt0 < 10) begin failures++; $display("FAIL loop count %0d", r - cnt0); end

    // 4. PI limiting: a large q command drives Uq into the limit
    axi_write(8'h04, 32'd30000);
    wait_irqs(3);
    axi_read(8'h40, r);
    if (r[6]) n_pisat++;
    axi_write(8'h04, 32'd1500);
    wait_irqs(3);

    // 5. overcurrent trip and clear
    axi_write(8'h24, 32'd5000);        // threshold
    raw1 = 16'sd6200;                  // 6000 after offset removal
    wait_irqs(3);
    axi_read(8'h40, r);
    checks++;
    if (!r[0] || !fault || r[3:1] != 3'b001 && r[3:1] != 3'b101) begin
      failures++; $display("FAIL trip status %h", r);
    end
    if (fault) n_trip++;
    wait_irqs(2);
    raw1 = 16'sd1200;
    wait_irqs(2);
    checks++;
    if (!fault) begin failures++; $display("FAIL fault not latched"); end
    axi_write(8'h00, 32'h7);           // run, cal, fault_clr
    wait_irqs(2);
    checks++;
    if (fault) begin failures++; $display("FAIL fault not cleared"); end
    else n_clear++;

    // 6. switching frequencies 10, 12 and 15 kHz
    foreach (p_half[i]) begin
      axi_write(8'h1c, 32'(p_half[i]));
      wait_irqs(2);
      irq_period(p);
      checks++;
      if (p != 2*p_half[i]) begin failures++; $display("FAIL period %0d for half %0d", p, p_half[i]); end
      else n_freq++;
    end
    raw1 = 16'(1000 + 200); raw2 = 16'(-500 - 150); angle = 16'd12000;
    wait_irqs(3);
    check_step(1000, -500, 12000, 1500, 256, 3333, 100);

    // mechanism summary
    checks++;
    if (n_shoot != 0 || n_off_fault != 0) begin failures++; $display("FAIL shoot-through %0d gates-on-in-fault %0d", n_shoot, n_off_fault); end
    $display("mechanisms: irq=%0d adc=%0d rdc=%0d cal=%0d loop=%0d deadtime=%0d pisat=%0d trip=%0d clear=%0d freq=%0d",
             n_irq, convs, reads, n_cal, n_loop, n_dead, n_pisat, n_trip, n_clear, n_freq);
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int p_half [3] = '{5000, 4167, 3333};
  int mech [10];
  always_comb mech = '{n_irq, convs, reads, n_cal, n_loop, n_dead, n_pisat, n_trip, n_clear, n_freq};

  initial begin
    repeat (3_000_000) @(posedge clk_100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
