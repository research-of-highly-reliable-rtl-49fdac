// apsoc_servo_top: programmable-logic servo-control coprocessor for a
// permanent-magnet synchronous motor.
//
// The processor system runs the position and speed loops in software and
// hands the coprocessor a q-axis current command over AXI4-Lite; the
// coprocessor closes the current loop in hardware once per PWM period:
//
//   pwm_gen --o_intrrupt--> (to processor) and, via clk_50,
//        --> adc_if  (AD7606, phase currents U, V)
//        --> rdc_if  (AD2S1210, rotor angle)
//   both results back in clk_100 --> zero_drift --> oc_protect
//                                              \--> cur_closeloop
//   cur_closeloop o_done --> pwm_gen i_data_latch (takes effect at the
//                            next period start)
//
// Clocks: clk_100 (100 MHz) for the loop, PWM, protection and registers;
// clk_50 (50 MHz) for the two converter interfaces, as in the source
// design's clock allocation.  Start and done pulses cross with toggle
// synchronisers; the converter results are held stable between requests.
// The loop starts only when both the current and the angle sample of the
// period have arrived.  The gate outputs are forced off while the drive is
// not enabled (CTRL.run) or an overcurrent fault is latched.
// Timing: the new compare values are ready about 0.5 us after the ADC's
// conversion ends (bus transfer, clock crossing and the 22-clock loop), so
// about 4.5 us after the interrupt with a 4 us conversion.  They are applied
// at the next period start: one PWM period of transport delay.
// The block structure and clocking follow the source design; the register
// map, the clock crossing and the join of the two acquisitions are this
// implementation's.
module apsoc_servo_top
  import apsoc_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned PWM_FREQ_HZ = 15_000
) (
  input  logic        clk_100,
  input  logic        clk_50,
  input  logic        rst_n,
  // AXI4-Lite slave (processor general-purpose port)
  input  logic [7:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [7:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // closed-loop interrupt to the processor and protection state
  output logic        o_intrrupt,
  output logic        o_fault,
  // gate drive
  output logic        o_pwm_up,
  output logic        o_pwm_un,
  output logic        o_pwm_vp,
  output logic        o_pwm_vn,
  output logic        o_pwm_wp,
  output logic        o_pwm_wn,
  // AD7606 parallel bus
  input  logic [15:0] adc_data,
  input  logic        adc_busy,
  output logic        adc_cs_n,
  output logic        adc_rd_n,
  output logic        adc_convst,
  // AD2S1210 serial port
  input  logic        rdc_miso,
  output logic        rdc_cs_n,
  output logic        rdc_fsync_n,
  output logic        rdc_sclk,
  output logic        rdc_mosi
);

  localparam logic [15:0] HALF_DEFAULT = 16'(CLK_HZ / (2 * PWM_FREQ_HZ));

  logic rst100_n, rst50_n;
  reset_sync u_rs100 (.clk(clk_100), .i_rst_n(rst_n), .o_rst_n(rst100_n));
  reset_sync u_rs50  (.clk(clk_50),  .i_rst_n(rst_n), .o_rst_n(rst50_n));

  cfg_t cfg;
  sts_t sts;

  axi_lite_regs #(.RST_HALF(HALF_DEFAULT)) u_regs (
    .clk(clk_100), .rst_n(rst100_n),
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready,
    .o_cfg(cfg), .i_sts(sts)
  );

  // ---------------- PWM timer and interrupt ----------------
  logic irq, fault, drive_en, loop_done;
  cnt_t tu, tv, tw;

  assign drive_en = cfg.run && !fault;

  pwm_gen u_pwm (
    .clk(clk_100), .rst_n(rst100_n), .i_en(drive_en), .i_data_latch(loop_done),
    .iv_tu(tu), .iv_tv(tv), .iv_tw(tw), .i_half(cfg.pwm_half), .i_dead(cfg.dead),
    .o_intrrupt(irq),
    .o_pwm_up, .o_pwm_un, .o_pwm_vp, .o_pwm_vn, .o_pwm_wp, .o_pwm_wn
  );
  assign o_intrrupt = irq;

  // ---------------- acquisition in the 50 MHz domain ----------------
  logic acq_start50, adc_done50, rdc_done50, adc_err50;
  cur_t ch1_50, ch2_50;
  ang_t ang_50;

  pulse_sync u_ps_start (.src_clk(clk_100), .src_rst_n(rst100_n), .i_pulse(irq),
                         .dst_clk(clk_50), .dst_rst_n(rst50_n), .o_pulse(acq_start50));

  adc_if u_adc (
    .clk(clk_50), .rst_n(rst50_n), .i_start(acq_start50),
    .iv_data(adc_data), .i_busy(adc_busy), .o_done(adc_done50), .o_err(adc_err50),
    .o_cs_n(adc_cs_n), .o_rd_n(adc_rd_n), .o_convst(adc_convst),
    .ov_ch1(ch1_50), .ov_ch2(ch2_50)
  );

  rdc_if u_rdc (
    .clk(clk_50), .rst_n(rst50_n), .i_start(acq_start50), .i_miso(rdc_miso),
    .o_done(rdc_done50), .o_cs_n(rdc_cs_n), .o_fsync_n(rdc_fsync_n),
    .o_sclk(rdc_sclk), .o_mosi(rdc_mosi), .ov_angle(ang_50)
  );

  logic adc_done, rdc_done;
  pulse_sync u_ps_adc (.src_clk(clk_50), .src_rst_n(rst50_n), .i_pulse(adc_done50),
                       .dst_clk(clk_100), .dst_rst_n(rst100_n), .o_pulse(adc_done));
  pulse_sync u_ps_rdc (.src_clk(clk_50), .src_rst_n(rst50_n), .i_pulse(rdc_done50),
                       .dst_clk(clk_100), .dst_rst_n(rst100_n), .o_pulse(rdc_done));

  // ---------------- join of the two samples (100 MHz) ----------------
  logic have_adc, have_rdc, both;
  cur_t raw1, raw2;
  ang_t theta;
  logic adc_err;

  assign both = (have_adc || adc_done) && (have_rdc || rdc_done);

  always_ff @(posedge clk_100 or negedge rst100_n) begin
    if (!rst100_n) begin
      have_adc <= 1'b0;
      have_rdc <= 1'b0;
      raw1     <= '0;
      raw2     <= '0;
      theta    <= '0;
      adc_err  <= 1'b0;
    end else begin
      if (adc_done) begin
        raw1    <= ch1_50;       // held stable by adc_if until its next start
        raw2    <= ch2_50;
        adc_err <= adc_err50;
      end
      if (rdc_done) theta <= ang_50;
      if (irq || both) begin
        have_adc <= 1'b0;
        have_rdc <= 1'b0;
      end else begin
        if (adc_done) have_adc <= 1'b1;
        if (rdc_done) have_rdc <= 1'b1;
      end
    end
  end

  logic sample_go;
  always_ff @(posedge clk_100 or negedge rst100_n) begin
    if (!rst100_n) sample_go <= 1'b0;
    else           sample_go <= both && !irq;
  end

  // ---------------- zero drift, protection, current loop ----------------
  logic cur_valid, cal_done;
  cur_t iu, iv, off1, off2;

  zero_drift u_zd (
    .clk(clk_100), .rst_n(rst100_n), .i_valid(sample_go), .i_cal(cfg.cal),
    .iv_ch1(raw1), .iv_ch2(raw2), .o_valid(cur_valid), .ov_iu(iu), .ov_iv(iv),
    .o_cal_done(cal_done), .ov_off1(off1), .ov_off2(off2)
  );

  logic [2:0] trip;
  oc_protect u_oc (
    .clk(clk_100), .rst_n(rst100_n), .i_valid(cur_valid), .i_iu(iu), .i_iv(iv),
    .i_limit(cfg.oc_limit), .i_clear(cfg.fault_clr), .o_fault(fault), .o_trip(trip)
  );
  assign o_fault = fault;

  cur_t id, iq;
  logic [2:0] sector;
  logic loop_busy, pi_sat;
  cur_closeloop u_loop (
    .clk(clk_100), .rst_n(rst100_n), .i_start(cur_valid), .i_en(drive_en),
    .iv_cur(cfg.iq_ref), .iv_iu(iu), .iv_iv(iv), .iv_theta(theta),
    .i_kp_d(cfg.kp_d), .i_ki_d(cfg.ki_d), .i_kp_q(cfg.kp_q), .i_ki_q(cfg.ki_q),
    .i_v_limit(cfg.v_limit), .i_half(cfg.pwm_half),
    .o_done(loop_done), .ov_tu(tu), .ov_tv(tv), .ov_tw(tw),
    .ov_id(id), .ov_iq(iq), .ov_sector(sector), .o_busy(loop_busy), .o_pi_sat(pi_sat)
  );

  logic [31:0] loop_count;
  always_ff @(posedge clk_100 or negedge rst100_n) begin
    if (!rst100_n)      loop_count <= '0;
    else if (loop_done) loop_count <= loop_count + 32'd1;
  end

  always_comb begin
    sts            = '0;
    sts.fault      = fault;
    sts.trip       = trip;
    sts.cal_done   = cal_done;
    sts.adc_err    = adc_err;
    sts.pi_sat     = pi_sat;
    sts.sector     = sector;
    sts.iu         = iu;
    sts.iv         = iv;
    sts.theta      = theta;
    sts.id         = id;
    sts.iq         = iq;
    sts.tu         = tu;
    sts.tv         = tv;
    sts.tw         = tw;
    sts.loop_count = loop_count;
  end

  logic unused;
  assign unused = ^{off1, off2, loop_busy};

endmodule
