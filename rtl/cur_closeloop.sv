// cur_closeloop: current closed loop and space-vector modulation (field-
// oriented control of the PMSM current), one step per i_start.
//
// Sequence after i_start (all at the 100 MHz loop clock):
//   1. latch iu, iv, theta and the q-current command; start the CORDIC
//   2. CORDIC sin/cos of theta                         (ITER+1 clocks)
//   3. Clarke + Park -> id, iq                         (1 clock, registered)
//   4. PI regulators: Ud from (0 - id), Uq from (iq_ref - iq)   (1 clock)
//   5. inverse Park -> U_alpha, U_beta                 (1 clock)
//   6. SVPWM -> three compare counts, o_done pulse     (1 clock)
// With the default ITER = 16 the results appear LATENCY = 22 clocks after
// i_start (o_done high in that clock).  A start while busy is ignored.
// The d-axis reference is fixed at zero as in the source design's control
// diagram; the q-axis reference (iv_cur) is the speed-loop output written by
// the processor.  While i_en is low the PI integrators are held empty and the
// step still runs (it then outputs 50 % duty), so no integral builds up
// before the power stage is enabled.
// The block split follows the source design (PI, Park, inverse Park, SVPWM,
// Clarke); the sequencing, latency and number formats are this
// implementation's.
module cur_closeloop
  import apsoc_pkg::*;
#(
  parameter int unsigned KP_FRAC = 8,
  parameter int unsigned KI_FRAC = 12,
  parameter int unsigned ITER    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_start,
  input  logic        i_en,
  input  cur_t        iv_cur,      // q-axis current command
  input  cur_t        iv_iu,
  input  cur_t        iv_iv,
  input  ang_t        iv_theta,
  input  logic [15:0] i_kp_d,
  input  logic [15:0] i_ki_d,
  input  logic [15:0] i_kp_q,
  input  logic [15:0] i_ki_q,
  input  logic [15:0] i_v_limit,
  input  cnt_t        i_half,
  output logic        o_done,
  output cnt_t        ov_tu,
  output cnt_t        ov_tv,
  output cnt_t        ov_tw,
  output cur_t        ov_id,
  output cur_t        ov_iq,
  output logic [2:0]  ov_sector,
  output logic        o_busy,
  output logic        o_pi_sat     // a PI output was clamped at the last step
);

  typedef enum logic [2:0] {S_IDLE, S_TRIG, S_PARK, S_PI, S_IPARK, S_SVM} state_e;
  state_e state_q;

  cur_t  iu_q, iv_q, iqref_q;
  trig_t sin_w, cos_w;
  logic  trig_done;
  cur_t  ialpha_w, ibeta_w, id_w, iq_w;
  cur_t  ud_w, uq_w, ua_w, ub_w;
  cur_t  ua_q, ub_q;
  cnt_t  tu_w, tv_w, tw_w;
  logic [2:0] sec_w;
  logic  sat_d, sat_q;

  sincos_cordic #(.ITER(ITER)) u_trig (
    .clk, .rst_n,
    .i_start (i_start && state_q == S_IDLE),
    .i_theta (iv_theta),
    .o_done  (trig_done),
    .o_sin   (sin_w),
    .o_cos   (cos_w)
  );

  clarke u_clarke (.i_iu(iu_q), .i_iv(iv_q), .o_ialpha(ialpha_w), .o_ibeta(ibeta_w));

  park u_park (.i_ialpha(ialpha_w), .i_ibeta(ibeta_w), .i_sin(sin_w), .i_cos(cos_w),
               .o_id(id_w), .o_iq(iq_w));

  pi_ctrl #(.KP_FRAC(KP_FRAC), .KI_FRAC(KI_FRAC)) u_pi_d (
    .clk, .rst_n, .i_clr(!i_en), .i_update(state_q == S_PI),
    .i_ref(16'sd0), .i_fb(ov_id), .i_kp(i_kp_d), .i_ki(i_ki_d), .i_limit(i_v_limit),
    .o_out(ud_w), .o_sat(sat_d)
  );

  pi_ctrl #(.KP_FRAC(KP_FRAC), .KI_FRAC(KI_FRAC)) u_pi_q (
    .clk, .rst_n, .i_clr(!i_en), .i_update(state_q == S_PI),
    .i_ref(iqref_q), .i_fb(ov_iq), .i_kp(i_kp_q), .i_ki(i_ki_q), .i_limit(i_v_limit),
    .o_out(uq_w), .o_sat(sat_q)
  );

  inv_park u_ipark (.i_ud(ud_w), .i_uq(uq_w), .i_sin(sin_w), .i_cos(cos_w),
                    .o_ualpha(ua_w), .o_ubeta(ub_w));

  svpwm u_svm (.i_ualpha(ua_q), .i_ubeta(ub_q), .i_half(i_half),
               .o_tu(tu_w), .o_tv(tv_w), .o_tw(tw_w), .o_sector(sec_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      iu_q      <= '0;
      iv_q      <= '0;
      iqref_q   <= '0;
      ov_id     <= '0;
      ov_iq     <= '0;
      ua_q      <= '0;
      ub_q      <= '0;
      ov_tu     <= '0;
      ov_tv     <= '0;
      ov_tw     <= '0;
      ov_sector <= '0;
      o_done    <= 1'b0;
    end else begin
      o_done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (i_start) begin
          iu_q    <= iv_iu;
          iv_q    <= iv_iv;
          iqref_q <= iv_cur;
          state_q <= S_TRIG;
        end
        S_TRIG: if (trig_done) state_q <= S_PARK;
        S_PARK: begin
          ov_id   <= id_w;
          ov_iq   <= iq_w;
          state_q <= S_PI;
        end
        S_PI:   state_q <= S_IPARK;
        S_IPARK: begin
          ua_q    <= ua_w;
          ub_q    <= ub_w;
          state_q <= S_SVM;
        end
        S_SVM: begin
          ov_tu     <= tu_w;
          ov_tv     <= tv_w;
          ov_tw     <= tw_w;
          ov_sector <= sec_w;
          o_done    <= 1'b1;
          state_q   <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign o_busy = (state_q != S_IDLE);

  assign o_pi_sat = sat_d | sat_q;

endmodule
