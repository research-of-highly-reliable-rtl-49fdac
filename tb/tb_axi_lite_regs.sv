// tb_axi_lite_regs: AXI4-Lite master tasks exercise the register bank:
// reset values, write/read-back of every configuration register, byte
// strobes, the self-clearing fault-clear bit, status registers packed from
// a random status struct, unmapped addresses, responses held while the
// master is not ready, and that nothing is accepted during reset.
module tb_axi_lite_regs;
  import apsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] awaddr, araddr;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0, arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  cfg_t cfg;
  sts_t sts;
  int checks = 0, failures = 0, clr_pulses = 0;
  axi_lite_regs #(.RST_HALF(16'd3333)) dut (.clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready), .s_axi_wdata(wdata),
    .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_bresp(bresp),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_araddr(araddr), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid),
    .s_axi_rready(rready), .o_cfg(cfg), .i_sts(sts));
  always #5 clk = !clk;
  always @(posedge clk) if (cfg.fault_clr) clr_pulses++;

  task automatic axi_write(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s, input int bdelay);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = s; wvalid = 1;
    @(posedge clk iff (awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    repeat (bdelay) @(negedge clk);
    checks++;
    if (!bvalid || bresp != 2'b00) begin failures++; $display("FAIL bvalid not held"); end
    bready = 1;
    @(negedge clk) bready = 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d, input int rdelay);
    @(negedge clk);
    araddr = a; arvalid = 1;
    @(posedge clk iff arready);
    @(negedge clk) arvalid = 0;
    repeat (rdelay) @(negedge clk);
    checks++;
    if (!rvalid) begin failures++; $display("FAIL rvalid not held"); end
    d = rdata;
    rready = 1;
    @(negedge clk) rready = 0;
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [31:0] e);
    logic [31:0] d;
    axi_read(a, d, $urandom_range(0, 3));
    checks++;
    if (d !== e) begin failures++; $display("FAIL read %h = %h exp %h", a, d, e); end
  endtask

  initial begin
    logic [31:0] vals [10];
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    sts = '0;
    // no handshake may complete while reset is asserted
    awaddr = 8'h04; wdata = 32'h55; wstrb = 4'hf; awvalid = 1; wvalid = 1; arvalid = 1;
    repeat (3) @(posedge clk);
    checks++;
    if (awready || wready || arready) begin failures++; $display("FAIL handshake during reset"); end
    @(negedge clk) begin awvalid = 0; wvalid = 0; arvalid = 0; end
    rst_n = 1;
    expect_rd(8'h08, 32'd256);
    expect_rd(8'h18, 32'd18918);
    expect_rd(8'h1c, 32'd3333);
    expect_rd(8'h20, 32'd100);
    for (int i = 1; i < 10; i++) begin
      vals[i] = {16'h0, 16'($urandom)};
      axi_write(8'(i*4), vals[i], 4'hf, $urandom_range(0, 3));
    end
    for (int i = 1; i < 10; i++) expect_rd(8'(i*4), vals[i]);
    checks++;
    if (cfg.iq_ref != vals[1][15:0] || cfg.kp_q != vals[4][15:0] || cfg.pwm_half != vals[7][15:0] ||
        cfg.oc_limit != vals[9][15:0]) begin failures++; $display("FAIL cfg outputs"); end
    // byte strobe: only the high byte of KPD changes
    axi_write(8'h08, 32'h0000_ab12, 4'b0010, 0);
    expect_rd(8'h08, {16'h0, 8'hab, vals[2][7:0]});
    // control: run and cal, plus a fault-clear pulse
    axi_write(8'h00, 32'h7, 4'h1, 1);
    checks++;
    if (!cfg.run || !cfg.cal || cfg.fault_clr || clr_pulses != 1) begin failures++; $display("FAIL ctrl %0d", clr_pulses); end
    expect_rd(8'h00, 32'h3);
    // status registers
    sts.fault = 1; sts.trip = 3'b101; sts.cal_done = 1; sts.adc_err = 0; sts.pi_sat = 1; sts.sector = 3'd4;
    sts.iu = 16'sh1234; sts.iv = -16'sd5; sts.theta = 16'hbeef; sts.id = 16'sd77; sts.iq = -16'sd300;
    sts.tu = 16'd100; sts.tv = 16'd200; sts.tw = 16'd300; sts.loop_count = 32'hdead_0001;
    expect_rd(8'h40, 32'h0000_045b);
    expect_rd(8'h44, {16'hfffb, 16'h1234});
    expect_rd(8'h48, 32'h0000_beef);
    expect_rd(8'h4c, {16'hfed4, 16'd77});
    expect_rd(8'h50, {16'd200, 16'd100});
    expect_rd(8'h54, 32'd300);
    expect_rd(8'h58, 32'hdead_0001);
    expect_rd(8'h7c, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
