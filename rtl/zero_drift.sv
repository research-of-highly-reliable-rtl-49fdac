// zero_drift: zero-drift (offset) treatment of the two phase-current samples.
//
// Hall current sensors and the ADC front end add a slowly drifting offset.
// A rising edge on i_cal (issued by the processor while the drive is
// stopped, i.e. at zero current) starts a calibration: the next 2^CAL_LOG2
// valid sample pairs are summed and the averages become the new offsets;
// o_cal_done then stays high until the next calibration starts.
// Every valid sample pair is corrected, ov_x = sat(ch_x - offset_x), and
// presented one clock later with o_valid.  Offsets reset to zero.
// The source design applies a zero-drift treatment to the sampled phase
// currents; the averaging calibration and its length are choices of this
// implementation.
module zero_drift
  import apsoc_pkg::*;
#(
  parameter int unsigned CAL_LOG2 = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i_valid,
  input  logic i_cal,
  input  cur_t iv_ch1,
  input  cur_t iv_ch2,
  output logic o_valid,
  output cur_t ov_iu,
  output cur_t ov_iv,
  output logic o_cal_done,
  output cur_t ov_off1,
  output cur_t ov_off2
);

  localparam int unsigned SW = 16 + CAL_LOG2 + 1;

  logic                cal_d, cal_run;
  logic [CAL_LOG2:0]   n_q;
  logic signed [SW-1:0] sum1_q, sum2_q, sum1_n, sum2_n;

  always_comb begin
    sum1_n = sum1_q + SW'(iv_ch1);
    sum2_n = sum2_q + SW'(iv_ch2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cal_d      <= 1'b0;
      cal_run    <= 1'b0;
      n_q        <= '0;
      sum1_q     <= '0;
      sum2_q     <= '0;
      ov_off1    <= '0;
      ov_off2    <= '0;
      o_cal_done <= 1'b0;
      o_valid    <= 1'b0;
      ov_iu      <= '0;
      ov_iv      <= '0;
    end else begin
      cal_d   <= i_cal;
      o_valid <= i_valid;
      if (i_cal && !cal_d) begin
        cal_run    <= 1'b1;
        o_cal_done <= 1'b0;
        n_q        <= '0;
        sum1_q     <= '0;
        sum2_q     <= '0;
      end else if (cal_run && i_valid) begin
        sum1_q <= sum1_n;
        sum2_q <= sum2_n;
        n_q    <= n_q + 1'b1;
        if (n_q == (CAL_LOG2+1)'((1 << CAL_LOG2) - 1)) begin
          ov_off1    <= 16'(sum1_n >>> CAL_LOG2);
          ov_off2    <= 16'(sum2_n >>> CAL_LOG2);
          cal_run    <= 1'b0;
          o_cal_done <= 1'b1;
        end
      end
      if (i_valid) begin
        ov_iu <= sat16(48'(iv_ch1) - 48'(ov_off1));
        ov_iv <= sat16(48'(iv_ch2) - 48'(ov_off2));
      end
    end
  end

endmodule
