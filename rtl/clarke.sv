// clarke: Clarke transformation of the measured phase currents.
//
// Only phases U and V are sampled (the ADC interface reads two channels), so
// the amplitude-invariant two-current form is used, which assumes the three
// phase currents sum to zero:
//   i_alpha = iu
//   i_beta  = (iu + 2*iv) / sqrt(3)
// Purely combinational; the product is rounded and saturated to 16 bits.
// The transform itself is the one named in the source design; the
// two-current form and the number format are choices of this implementation.
module clarke
  import apsoc_pkg::*;
(
  input  cur_t i_iu,
  input  cur_t i_iv,
  output cur_t o_ialpha,
  output cur_t o_ibeta
);

  logic signed [17:0] sum;
  logic signed [47:0] prod;

  always_comb begin
    sum      = 18'(i_iu) + (18'(i_iv) <<< 1);
    prod     = 48'(sum) * 48'(INV_SQRT3_Q15) + 48'sd16384;
    o_ialpha = i_iu;
    o_ibeta  = sat16(prod >>> 15);
  end

endmodule
