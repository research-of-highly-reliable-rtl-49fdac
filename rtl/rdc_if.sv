// rdc_if: serial read-out of the rotor angle from an AD2S1210 resolver-to-
// digital converter (IP_RDC).
//
// One read per i_start pulse: CS and FSYNC go low, then FRAME_BITS serial
// clocks are generated with SCLK idling high, each half period SCLK_DIV
// clocks long.  MOSI shifts out the command word CMD MSB first, changing on
// the falling SCLK edge; MISO is sampled on the rising edge, MSB first.
// After the last bit FSYNC and CS return high, the received word (its low
// 16 bits) is presented on ov_angle and o_done pulses for one clock.
// With the default 50 MHz clock, SCLK_DIV = 2 gives 12.5 MHz and a read
// ends 2*SCLK_DIV*FRAME_BITS + 2 = 66 clocks after i_start with o_done
// (1.32 us).
// The port list is that of the source design; the frame format, clock
// polarity and rate are choices of this implementation.
module rdc_if
  import apsoc_pkg::*;
#(
  parameter int unsigned SCLK_DIV   = 2,
  parameter int unsigned FRAME_BITS = 16,
  parameter logic [31:0] CMD        = 32'h0000_8000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i_start,
  input  logic i_miso,
  output logic o_done,
  output logic o_cs_n,
  output logic o_fsync_n,
  output logic o_sclk,
  output logic o_mosi,
  output ang_t ov_angle
);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_END} state_e;
  state_e      state_q;
  logic [7:0]  div_q;
  logic [5:0]  bit_q;
  logic [31:0] tx_q, rx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      div_q     <= '0;
      bit_q     <= '0;
      tx_q      <= '0;
      rx_q      <= '0;
      o_done    <= 1'b0;
      o_cs_n    <= 1'b1;
      o_fsync_n <= 1'b1;
      o_sclk    <= 1'b1;
      o_mosi    <= 1'b0;
      ov_angle  <= '0;
    end else begin
      o_done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (i_start) begin
          o_cs_n    <= 1'b0;
          o_fsync_n <= 1'b0;
          o_sclk    <= 1'b0;                       // first falling edge
          o_mosi    <= CMD[FRAME_BITS-1];
          tx_q      <= CMD << 1;
          bit_q     <= 6'(FRAME_BITS - 1);
          div_q     <= 8'(SCLK_DIV - 1);
          state_q   <= S_LOW;
        end
        S_LOW: if (div_q == '0) begin
          o_sclk  <= 1'b1;                         // rising edge: sample
          rx_q    <= {rx_q[30:0], i_miso};
          div_q   <= 8'(SCLK_DIV - 1);
          state_q <= S_HIGH;
        end else div_q <= div_q - 8'd1;
        S_HIGH: if (div_q == '0) begin
          if (bit_q == '0) begin
            o_fsync_n <= 1'b1;
            o_cs_n    <= 1'b1;
            state_q   <= S_END;
          end else begin
            o_sclk  <= 1'b0;
            o_mosi  <= tx_q[FRAME_BITS-1];
            tx_q    <= tx_q << 1;
            bit_q   <= bit_q - 6'd1;
            div_q   <= 8'(SCLK_DIV - 1);
            state_q <= S_LOW;
          end
        end else div_q <= div_q - 8'd1;
        S_END: begin
          ov_angle <= rx_q[15:0];
          o_done   <= 1'b1;
          state_q  <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // only the low 16 received bits carry the angle
  logic unused;
  assign unused = ^rx_q[31:16];

endmodule
