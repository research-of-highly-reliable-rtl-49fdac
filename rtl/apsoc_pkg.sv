// apsoc_pkg: shared types and constants of the servo-control coprocessor.
//
// Number formats used throughout the datapath (these are choices of this
// implementation; the source design does not publish its fixed-point formats):
//   * currents:  signed 16 bit, ADC counts (AD7606 two's complement codes)
//   * voltages:  signed 16 bit, 32768 corresponds to the DC-link voltage
//   * angles:    unsigned 16 bit, 65536 per electrical turn
//   * sin/cos:   signed Q2.14 (16384 = 1.0)
// The configuration and status structs are the payload of the AXI4-Lite
// register bank that connects the processor system to the coprocessor.
package apsoc_pkg;

  localparam int unsigned CUR_W  = 16;
  localparam int unsigned ANG_W  = 16;

  typedef logic signed [CUR_W-1:0] cur_t;          // current or voltage sample
  typedef logic        [ANG_W-1:0] ang_t;          // electrical angle
  typedef logic signed [15:0]      trig_t;         // Q2.14 sine / cosine
  typedef logic        [15:0]      cnt_t;          // PWM timer counts

  // 1/sqrt(3) and sqrt(3)/2 in Q1.15
  localparam logic signed [17:0] INV_SQRT3_Q15  = 18'sd18919;
  localparam logic signed [17:0] SQRT3_2_Q15    = 18'sd28378;

  // Saturate a wide signed value to the 16-bit sample range.
  function automatic cur_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  // Configuration written by the processor.
  typedef struct packed {
    logic        run;        // enable current loop and PWM outputs
    logic        cal;        // request zero-drift calibration (level, edge used)
    logic        fault_clr;  // clear latched overcurrent fault (pulse)
    cur_t        iq_ref;     // q-axis current command (output of the speed loop)
    logic [15:0] kp_d;       // Q8.8
    logic [15:0] ki_d;       // Q4.12
    logic [15:0] kp_q;
    logic [15:0] ki_q;
    logic [15:0] v_limit;    // PI output limit, voltage units
    cnt_t        pwm_half;   // half switching period, clk_100 cycles
    cnt_t        dead;       // dead time, clk_100 cycles
    logic [15:0] oc_limit;   // overcurrent threshold, current units
  } cfg_t;

  // Status read back by the processor.
  typedef struct packed {
    logic        fault;
    logic [2:0]  trip;
    logic        cal_done;
    logic        adc_err;
    logic        pi_sat;
    logic [2:0]  sector;
    cur_t        iu;
    cur_t        iv;
    ang_t        theta;
    cur_t        id;
    cur_t        iq;
    cnt_t        tu;
    cnt_t        tv;
    cnt_t        tw;
    logic [31:0] loop_count;
  } sts_t;

  // Register word addresses (byte address = index * 4).
  typedef enum logic [4:0] {
    R_CTRL = 5'd0, R_IQREF = 5'd1, R_KPD = 5'd2, R_KID = 5'd3, R_KPQ = 5'd4,
    R_KIQ = 5'd5, R_VLIM = 5'd6, R_HALF = 5'd7, R_DEAD = 5'd8, R_OCLIM = 5'd9,
    R_STATUS = 5'd16, R_IUV = 5'd17, R_THETA = 5'd18, R_IDQ = 5'd19,
    R_TUV = 5'd20, R_TW = 5'd21, R_COUNT = 5'd22
  } reg_addr_e;

endpackage
