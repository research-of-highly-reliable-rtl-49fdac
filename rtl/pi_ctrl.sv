// pi_ctrl: PI current regulator with limiting.
//
// On each i_update pulse:
//   e     = ref - fb
//   integ = clamp(integ + e*Ki / 2^KI_FRAC, +-limit)   (kept with KI_FRAC
//                                                      fraction bits)
//   out   = clamp(e*Kp / 2^KP_FRAC + integ, +-limit)
// Clamping the integrator to the same limit as the output is the
// anti-windup.  o_out is registered and changes one clock after i_update.
// i_clr (synchronous) empties the integrator and zeroes the output; it is held
// while the drive is disabled so no integral builds up at power-on.
// The source design shows PI blocks for the d and q current; the gain formats
// and the anti-windup method are choices of this implementation.
module pi_ctrl
  import apsoc_pkg::*;
#(
  parameter int unsigned KP_FRAC = 8,    // Kp is Q8.8
  parameter int unsigned KI_FRAC = 12    // Ki is Q4.12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_clr,
  input  logic        i_update,
  input  cur_t        i_ref,
  input  cur_t        i_fb,
  input  logic [15:0] i_kp,
  input  logic [15:0] i_ki,
  input  logic [15:0] i_limit,   // positive, at most 32767
  output cur_t        o_out,
  output logic        o_sat      // output reached the limit at the last update
);

  localparam int unsigned AW = 48;

  logic signed [AW-1:0] integ_q;
  logic signed [AW-1:0] err, p_term, i_next, i_lim, lim, sum;

  always_comb begin
    lim    = AW'(signed'({1'b0, i_limit}));
    err    = AW'(i_ref) - AW'(i_fb);
    p_term = (err * AW'(signed'({1'b0, i_kp}))) >>> KP_FRAC;
    i_lim  = lim <<< KI_FRAC;
    i_next = integ_q + err * AW'(signed'({1'b0, i_ki}));
    if (i_next > i_lim)       i_next = i_lim;
    else if (i_next < -i_lim) i_next = -i_lim;
    sum    = p_term + (i_next >>> KI_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ_q <= '0;
      o_out   <= '0;
      o_sat   <= 1'b0;
    end else if (i_clr) begin
      integ_q <= '0;
      o_out   <= '0;
      o_sat   <= 1'b0;
    end else if (i_update) begin
      integ_q <= i_next;
      if (sum >= lim) begin
        o_out <= lim[15:0];
        o_sat <= 1'b1;
      end else if (sum <= -lim) begin
        o_out <= 16'(-lim);
        o_sat <= 1'b1;
      end else begin
        o_out <= sum[15:0];
        o_sat <= 1'b0;
      end
    end
  end

endmodule
