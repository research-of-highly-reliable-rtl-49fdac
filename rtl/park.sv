// park: Park transformation, stationary (alpha, beta) to rotor (d, q) frame.
//   id =  i_alpha*cos(theta) + i_beta*sin(theta)
//   iq = -i_alpha*sin(theta) + i_beta*cos(theta)
// sin/cos are Q2.14; products are summed at full width, rounded, shifted by
// 14 and saturated to 16 bits.  Combinational.  The source design names the
// transform; the sign convention and number formats are this implementation's.
module park
  import apsoc_pkg::*;
(
  input  cur_t  i_ialpha,
  input  cur_t  i_ibeta,
  input  trig_t i_sin,
  input  trig_t i_cos,
  output cur_t  o_id,
  output cur_t  o_iq
);

  logic signed [47:0] d_acc, q_acc;

  always_comb begin
    d_acc = 48'(i_ialpha) * 48'(i_cos) + 48'(i_ibeta) * 48'(i_sin) + 48'sd8192;
    q_acc = 48'(i_ibeta) * 48'(i_cos) - 48'(i_ialpha) * 48'(i_sin) + 48'sd8192;
    o_id  = sat16(d_acc >>> 14);
    o_iq  = sat16(q_acc >>> 14);
  end

endmodule
