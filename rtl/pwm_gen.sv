// pwm_gen: three-phase centre-aligned PWM timer with dead time (IP_PWM).
//
// A triangle counter runs 0,1,..,H-1 (up) then H,H-1,..,1 (down), so one
// switching period is 2*H clocks; H is i_half, sampled at each period start.
// With the default 100 MHz clock, H = 3333 gives 15 kHz.  At every period
// start (counter 0) the timer
//   * pulses o_intrrupt for one clock (closed-loop interrupt to the
//     processor, and the start of ADC and resolver acquisition), and
//   * copies the compare values captured by the last i_data_latch pulse into
//     the active registers (double buffering, so a period never sees a
//     half-updated set).
// The reference of phase x is high while cnt < cmp_x on the up slope and
// cnt <= cmp_x on the down slope: exactly 2*cmp_x clocks per period, centred
// on the period boundary.  Each reference drives a complementary pair: after
// every reference edge both switches stay off for i_dead clocks, then the
// switch selected by the reference turns on.  The high-side on-time is thus
// 2*cmp_x - i_dead.  i_en low forces all six gate outputs off at once
// (protection, drive disabled); the timer and interrupt keep running.
// Adjustable frequency and complementary dead time follow the source
// design; the counter shape, buffering and edge rules are this
// implementation's.
module pwm_gen
  import apsoc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic i_en,
  input  logic i_data_latch,
  input  cnt_t iv_tu,
  input  cnt_t iv_tv,
  input  cnt_t iv_tw,
  input  cnt_t i_half,
  input  cnt_t i_dead,
  output logic o_intrrupt,
  output logic o_pwm_up,
  output logic o_pwm_un,
  output logic o_pwm_vp,
  output logic o_pwm_vn,
  output logic o_pwm_wp,
  output logic o_pwm_wn
);

  cnt_t cnt_q, half_q;
  logic down_q;
  cnt_t shadow_q [3];
  cnt_t cmp_q    [3];
  cnt_t dt_q     [3];
  logic ref_q    [3];
  logic hi_q     [3];
  logic lo_q     [3];
  logic ref_d    [3];
  logic pstart;

  // the period starts when the down slope reaches 1 (next count is 0)
  assign pstart = (down_q && cnt_q <= 16'd1) || (!down_q && half_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= '0;
      down_q     <= 1'b0;
      half_q     <= '0;
      o_intrrupt <= 1'b0;
    end else begin
      o_intrrupt <= pstart;
      if (pstart) begin
        cnt_q  <= '0;
        down_q <= 1'b0;
        half_q <= (i_half < 16'd2) ? 16'd2 : i_half;
      end else if (!down_q) begin
        if (cnt_q == half_q - 16'd1) down_q <= 1'b1;
        cnt_q <= cnt_q + 16'd1;
      end else begin
        cnt_q <= cnt_q - 16'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        shadow_q[i] <= '0;
        cmp_q[i]    <= '0;
      end
    end else begin
      if (i_data_latch) begin
        shadow_q[0] <= iv_tu;
        shadow_q[1] <= iv_tv;
        shadow_q[2] <= iv_tw;
      end
      if (pstart) begin
        for (int i = 0; i < 3; i++) cmp_q[i] <= shadow_q[i];
      end
    end
  end

  // phase references for the present count value
  always_comb begin
    for (int i = 0; i < 3; i++)
      ref_d[i] = down_q ? (cnt_q <= cmp_q[i]) : (cnt_q < cmp_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        ref_q[i] <= 1'b0;
        dt_q[i]  <= '0;
        hi_q[i]  <= 1'b0;
        lo_q[i]  <= 1'b0;
      end
    end else begin
      for (int i = 0; i < 3; i++) begin
        ref_q[i] <= ref_d[i];
        if (ref_d[i] != ref_q[i] && i_dead != '0) begin
          dt_q[i] <= i_dead;
          hi_q[i] <= 1'b0;
          lo_q[i] <= 1'b0;
        end else if (dt_q[i] > 16'd1) begin
          dt_q[i] <= dt_q[i] - 16'd1;
        end else begin
          dt_q[i] <= '0;
          hi_q[i] <= ref_d[i];
          lo_q[i] <= !ref_d[i];
        end
      end
    end
  end

  assign o_pwm_up = i_en & hi_q[0];
  assign o_pwm_un = i_en & lo_q[0];
  assign o_pwm_vp = i_en & hi_q[1];
  assign o_pwm_vn = i_en & lo_q[1];
  assign o_pwm_wp = i_en & hi_q[2];
  assign o_pwm_wn = i_en & lo_q[2];

endmodule
