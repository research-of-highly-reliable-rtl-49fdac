// axi_lite_regs: AXI4-Lite slave holding the coprocessor's registers.
//
// The processor writes the control word, the q-current command (the output
// of its speed loop), the PI gains and limit, the PWM half period and dead
// time and the overcurrent threshold; it reads back the special status
// registers and the operation data of the current loop.
//
// Register map (32-bit words, byte address = 4 * index):
//   0 CTRL   [0] run  [1] cal (zero-drift calibration on 0->1)
//            [2] fault_clr (write 1, self-clearing)
//   1 IQREF  [15:0] q current command      2 KPD  3 KID  4 KPQ  5 KIQ
//   6 VLIM   7 HALF (PWM half period)      8 DEAD 9 OCLIM
//  16 STATUS [0] fault [3:1] trip [4] cal_done [5] adc_err [6] pi_sat
//            [10:8] sector
//  17 IUV    {iv, iu}   18 THETA   19 IDQ {iq, id}
//  20 TUV    {tv, tu}   21 TW      22 COUNT (completed loop steps)
// Unmapped addresses read 0 and ignore writes; responses are always OKAY.
// A write needs AW and W together (both are accepted in the same clock);
// the B response follows one clock later.  Nothing is accepted while reset
// is asserted or in the first clock after it.  A read answers one clock after
// AR.  Reset values: gains Kp = 1.0, Ki = 64/4096, voltage limit Vdc/sqrt(3),
// PWM half period RST_HALF (15 kHz at 100 MHz), dead time 1 us.
// The source design connects processor and coprocessor over an AXI4-Lite
// general-purpose port; the register map and reset values are choices of
// this implementation.
module axi_lite_regs
  import apsoc_pkg::*;
#(
  parameter logic [15:0] RST_HALF  = 16'd3333,
  parameter logic [15:0] RST_DEAD  = 16'd100,
  parameter logic [15:0] RST_OCLIM = 16'd30000
) (
  input  logic        clk,
  input  logic        rst_n,
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
  output cfg_t        o_cfg,
  input  sts_t        i_sts
);

  logic do_wr, do_rd;
  logic alive_q;     // low during reset: no handshake is accepted then
  logic [4:0] widx, ridx;
  logic [31:0] rd_w;

  assign do_wr = alive_q && s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign do_rd = alive_q && s_axi_arvalid && !s_axi_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) alive_q <= 1'b0;
    else        alive_q <= 1'b1;
  end
  assign s_axi_awready = do_wr;
  assign s_axi_wready  = do_wr;
  assign s_axi_arready = do_rd;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign widx = s_axi_awaddr[6:2];
  assign ridx = s_axi_araddr[6:2];

  function automatic logic [15:0] upd16(input logic [15:0] old, input logic [15:0] d,
                                        input logic [1:0] strb);
    return {strb[1] ? d[15:8] : old[15:8], strb[0] ? d[7:0] : old[7:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_cfg          <= '0;
      o_cfg.kp_d     <= 16'd256;
      o_cfg.ki_d     <= 16'd64;
      o_cfg.kp_q     <= 16'd256;
      o_cfg.ki_q     <= 16'd64;
      o_cfg.v_limit  <= 16'd18918;
      o_cfg.pwm_half <= RST_HALF;
      o_cfg.dead     <= RST_DEAD;
      o_cfg.oc_limit <= RST_OCLIM;
      s_axi_bvalid   <= 1'b0;
    end else begin
      o_cfg.fault_clr <= 1'b0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (do_wr) begin
        s_axi_bvalid <= 1'b1;
        case (widx)
          R_CTRL: if (s_axi_wstrb[0]) begin
            o_cfg.run       <= s_axi_wdata[0];
            o_cfg.cal       <= s_axi_wdata[1];
            o_cfg.fault_clr <= s_axi_wdata[2];
          end
          R_IQREF: o_cfg.iq_ref   <= upd16(o_cfg.iq_ref, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          R_KPD:   o_cfg.kp_d     <= upd16(o_cfg.kp_d, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          R_KID:   o_cfg.ki_d     <= upd16(o_cfg.ki_d, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          R_KPQ:   o_cfg.kp_q     <= upd16(o_cfg.kp_q, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          R_KIQ:   o_cfg.ki_q     <= upd16(o_cfg.ki_q, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          R_VLIM:  o_cfg.v_limit  <= upd16(o_cfg.v_limit, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          R_HALF:  o_cfg.pwm_half <= upd16(o_cfg.pwm_half, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          R_DEAD:  o_cfg.dead     <= upd16(o_cfg.dead, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          R_OCLIM: o_cfg.oc_limit <= upd16(o_cfg.oc_limit, s_axi_wdata[15:0], s_axi_wstrb[1:0]);
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (ridx)
      R_CTRL:   rd_w = {29'd0, 1'b0, o_cfg.cal, o_cfg.run};
      R_IQREF:  rd_w = {16'd0, o_cfg.iq_ref};
      R_KPD:    rd_w = {16'd0, o_cfg.kp_d};
      R_KID:    rd_w = {16'd0, o_cfg.ki_d};
      R_KPQ:    rd_w = {16'd0, o_cfg.kp_q};
      R_KIQ:    rd_w = {16'd0, o_cfg.ki_q};
      R_VLIM:   rd_w = {16'd0, o_cfg.v_limit};
      R_HALF:   rd_w = {16'd0, o_cfg.pwm_half};
      R_DEAD:   rd_w = {16'd0, o_cfg.dead};
      R_OCLIM:  rd_w = {16'd0, o_cfg.oc_limit};
      R_STATUS: rd_w = {21'd0, i_sts.sector, 1'b0, i_sts.pi_sat, i_sts.adc_err, i_sts.cal_done,
                        i_sts.trip, i_sts.fault};
      R_IUV:    rd_w = {i_sts.iv, i_sts.iu};
      R_THETA:  rd_w = {16'd0, i_sts.theta};
      R_IDQ:    rd_w = {i_sts.iq, i_sts.id};
      R_TUV:    rd_w = {i_sts.tv, i_sts.tu};
      R_TW:     rd_w = {16'd0, i_sts.tw};
      R_COUNT:  rd_w = i_sts.loop_count;
      default:  rd_w = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (do_rd) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= rd_w;
      end
    end
  end

  // AXI rule: a response, once valid, is held until it is accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

  logic unused;
  assign unused = ^{s_axi_wdata[31:16], s_axi_wstrb[3:2], s_axi_awaddr[7], s_axi_awaddr[1:0], s_axi_araddr[7], s_axi_araddr[1:0]};

endmodule
