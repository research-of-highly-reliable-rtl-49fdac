// adc_if: acquisition interface for an AD7606 ADC on its parallel bus (IP_ADC).
//
// One acquisition per i_start pulse:
//   1. CONVST is driven low for CONVST_LOW clocks; its rising edge starts
//      the conversion of all channels.
//   2. BUSY is given BUSY_SETTLE clocks to rise, then the interface waits for
//      BUSY low.  If BUSY is still high after BUSY_TIMEOUT clocks the
//      acquisition ends with o_err set and the previous results kept.
//   3. CS is pulled low and two RD strobes (RD_LOW clocks low, RD_HIGH clocks
//      high) read channel 1 and channel 2; the data bus is sampled in the
//      last clock of each RD-low phase.
//   4. CS returns high and o_done pulses for one clock; ov_ch1/ov_ch2 stay
//      valid until the end of the next acquisition.
// The two channels carry the U and V phase currents.  At the 50 MHz clock
// and default parameters the bus phase lasts about 0.3 us after BUSY falls.
// The port list is that of the source design; the bus timing follows the
// ADC's usual parallel read-out and its cycle counts are choices of this
// implementation.
module adc_if
  import apsoc_pkg::*;
#(
  parameter int unsigned CONVST_LOW   = 2,
  parameter int unsigned BUSY_SETTLE  = 3,
  parameter int unsigned BUSY_TIMEOUT = 500,
  parameter int unsigned RD_LOW       = 2,
  parameter int unsigned RD_HIGH      = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_start,
  input  logic [15:0] iv_data,
  input  logic        i_busy,
  output logic        o_done,
  output logic        o_err,
  output logic        o_cs_n,
  output logic        o_rd_n,
  output logic        o_convst,
  output cur_t        ov_ch1,
  output cur_t        ov_ch2
);

  typedef enum logic [2:0] {S_IDLE, S_CONV, S_SETTLE, S_BUSY, S_RDL, S_RDH, S_END} state_e;
  state_e      state_q;
  logic [15:0] tmr_q;
  logic        ch_q;      // 0: channel 1, 1: channel 2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      tmr_q    <= '0;
      ch_q     <= 1'b0;
      o_done   <= 1'b0;
      o_err    <= 1'b0;
      o_cs_n   <= 1'b1;
      o_rd_n   <= 1'b1;
      o_convst <= 1'b1;
      ov_ch1   <= '0;
      ov_ch2   <= '0;
    end else begin
      o_done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (i_start) begin
          o_convst <= 1'b0;
          tmr_q    <= 16'(CONVST_LOW - 1);
          state_q  <= S_CONV;
        end
        S_CONV: if (tmr_q == '0) begin
          o_convst <= 1'b1;
          tmr_q    <= 16'(BUSY_SETTLE - 1);
          state_q  <= S_SETTLE;
        end else tmr_q <= tmr_q - 16'd1;
        S_SETTLE: if (tmr_q == '0) begin
          tmr_q   <= 16'(BUSY_TIMEOUT - 1);
          state_q <= S_BUSY;
        end else tmr_q <= tmr_q - 16'd1;
        S_BUSY: if (!i_busy) begin
          o_cs_n  <= 1'b0;
          o_rd_n  <= 1'b0;
          ch_q    <= 1'b0;
          tmr_q   <= 16'(RD_LOW - 1);
          state_q <= S_RDL;
        end else if (tmr_q == '0) begin
          o_err   <= 1'b1;
          state_q <= S_END;
        end else tmr_q <= tmr_q - 16'd1;
        S_RDL: if (tmr_q == '0) begin
          if (ch_q) ov_ch2 <= iv_data;
          else      ov_ch1 <= iv_data;
          o_rd_n  <= 1'b1;
          tmr_q   <= 16'(RD_HIGH - 1);
          state_q <= S_RDH;
        end else tmr_q <= tmr_q - 16'd1;
        S_RDH: if (tmr_q == '0) begin
          if (ch_q) begin
            o_cs_n  <= 1'b1;
            o_err   <= 1'b0;
            state_q <= S_END;
          end else begin
            ch_q    <= 1'b1;
            o_rd_n  <= 1'b0;
            tmr_q   <= 16'(RD_LOW - 1);
            state_q <= S_RDL;
          end
        end else tmr_q <= tmr_q - 16'd1;
        S_END: begin
          o_done  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
