// inv_park: inverse Park transformation, rotor (d, q) to stationary frame.
//   U_alpha = Ud*cos(theta) - Uq*sin(theta)
//   U_beta  = Ud*sin(theta) + Uq*cos(theta)
// sin/cos are Q2.14; results are rounded and saturated to 16 bits.
// Combinational.  Named in the source design; formats are this
// implementation's.
module inv_park
  import apsoc_pkg::*;
(
  input  cur_t  i_ud,
  input  cur_t  i_uq,
  input  trig_t i_sin,
  input  trig_t i_cos,
  output cur_t  o_ualpha,
  output cur_t  o_ubeta
);

  logic signed [47:0] a_acc, b_acc;

  always_comb begin
    a_acc    = 48'(i_ud) * 48'(i_cos) - 48'(i_uq) * 48'(i_sin) + 48'sd8192;
    b_acc    = 48'(i_ud) * 48'(i_sin) + 48'(i_uq) * 48'(i_cos) + 48'sd8192;
    o_ualpha = sat16(a_acc >>> 14);
    o_ubeta  = sat16(b_acc >>> 14);
  end

endmodule
