// tb_servo_closed_loop: the coprocessor at its default parameters (15 kHz
// PWM) regulates the current of a rotating PMSM.  The gate outputs drive a
// behavioural motor model (pmsm_model), whose phase currents (plus sensor
// offsets) feed the AD7606 model and whose rotor angle feeds the AD2S1210
// model.  An AXI4-Lite master plays the processor: it calibrates the offsets
// at standstill, sets the PI gains and a q-current command, starts the drive,
// and later steps the command.  Pass criteria, evaluated on the model's own
// currents (not on the design's status): after settling, the stator current
// amplitude matches |iq command| within 4 % and lies on the q axis (the
// d component, computed from the model's angle, within 4 % of the command).
module tb_servo_closed_loop;
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
  int convs, reads, theta, dtheta = 0;
  real ia, ib, ic;
  int checks = 0, failures = 0;
  localparam int OFF1 = 300, OFF2 = -200;

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

  pmsm_model motor (.clk(clk_100), .irq, .up, .un, .vp, .vn, .wp, .wn, .dtheta, .ia, .ib, .ic, .theta);

  assign raw1  = 16'($rtoi(ia) + OFF1);
  assign raw2  = 16'($rtoi(ib) + OFF2);
  assign angle = 16'(theta);

  ad7606_model #(.CONV_NS(4000)) adc (.convst(adc_convst), .cs_n(adc_cs_n), .rd_n(adc_rd_n),
    .ch1(raw1), .ch2(raw2), .no_busy_fall(1'b0), .busy(adc_busy), .db(adc_db), .conversions(convs));
  ad2s1210_model rdc (.cs_n(rdc_cs_n), .fsync_n(rdc_fsync_n), .sclk(rdc_sclk), .sdi(rdc_mosi),
    .angle, .sdo(rdc_miso), .cmd_rx(cmd_rx), .reads(reads));

  always #5 clk_100 = !clk_100;
  initial begin #3; forever #10 clk_50 = !clk_50; end

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

  // d/q components of the model's current at the model's angle, averaged
  task automatic check_tracking(input real iq_cmd);
    real sd = 0.0, sq = 0.0;
    for (int k = 0; k < 32; k++) begin
      real th, a, b;
      wait_irqs(1);
      #1;
      th = 2.0 * PI * real'(theta) / 65536.0;
      a  = ia; b = (ia + 2.0*ib) / $sqrt(3.0);
      sd += ( a*$cos(th) + b*$sin(th)) / 32.0;
      sq += (-a*$sin(th) + b*$cos(th)) / 32.0;
    end
    $display("iq command %0.0f: model id=%0.1f iq=%0.1f", iq_cmd, sd, sq);
    checks++;
    if (absr(sq - iq_cmd) > 0.04 * absr(iq_cmd) || absr(sd) > 0.04 * absr(iq_cmd)) begin
      failures++; $display("FAIL tracking");
    end
  endtask

  initial begin
    logic [31:0] r;
    repeat (5) @(posedge clk_100);
    rst_n = 1;
    // offsets measured at standstill with the bridge off
    axi_write(8'h00, 32'h2);
    do begin wait_irqs(8); axi_read(8'h40, r); end while (!r[4]);
    wait_irqs(2);
    axi_read(8'h44, r);
    checks++;
    if (r != 32'h0) begin failures++; $display("FAIL offsets not removed %h", r); end
    // gains: Kp = 1.0, Ki = 0.1
    axi_write(8'h10, 32'd256); axi_write(8'h14, 32'd410);
    axi_write(8'h08, 32'd256); axi_write(8'h0c, 32'd410);
    axi_write(8'h04, 32'd2000);
    dtheta = 150;                       // about 34 Hz electrical at 15 kHz
    axi_write(8'h00, 32'h3);            // run
    wait_irqs(300);
    check_tracking(2000.0);
    axi_write(8'h04, 32'hffff_fc18);    // -1000
    wait_irqs(300);
    check_tracking(-1000.0);
    dtheta = 400;                       // faster rotor, larger back-EMF frequency
    axi_write(8'h04, 32'd3000);
    wait_irqs(300);
    check_tracking(3000.0);
    checks++;
    if (fault) begin failures++; $display("FAIL unexpected overcurrent trip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk_100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
