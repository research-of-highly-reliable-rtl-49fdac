// svpwm: space-vector modulation of the inverse-Park output.
//
// Converts the stator voltage reference (U_alpha, U_beta; 32768 = DC-link
// voltage) into three on-time counts for a centre-aligned PWM timer whose
// half period is i_half clocks.  The phase references are reconstructed with
// the inverse Clarke transform and the common-mode term -(max+min)/2 is
// added to all three ("min-max" injection).  In the linear range this yields
// exactly the dwell times of the classic sector / T1 / T2 / T0 method with the
// zero-vector time split equally between 000 and 111, at the cost of three
// comparisons instead of a sector table:
//   on_x = i_half * (1/2 + (v_x + v_off) / Vdc)
// Above the linear range (|U| > Vdc/sqrt(3)) the counts saturate to 0 or
// i_half (own choice).  o_sector reports the sector 1..6 in the textbook
// numbering (N = A + 2B + 4C mapped 3,1,5,4,6,2 -> 1..6), 0 for a zero vector.
// Combinational.  The source design only names SVPWM; the method is this
// implementation's.
module svpwm
  import apsoc_pkg::*;
(
  input  cur_t       i_ualpha,
  input  cur_t       i_ubeta,
  input  cnt_t       i_half,
  output cnt_t       o_tu,
  output cnt_t       o_tv,
  output cnt_t       o_tw,
  output logic [2:0] o_sector
);

  logic signed [35:0] s_a, s_b;              // alpha*sqrt3/2, beta/2 in Q15
  logic signed [19:0] va, vb, vc, vmax, vmin, voff;
  logic signed [47:0] on_u, on_v, on_w;
  logic               a_bit, b_bit, c_bit;
  logic [2:0]         n;

  function automatic cnt_t clamp_cnt(input logic signed [47:0] v, input cnt_t half);
    if (v < 48'sd0)                  return '0;
    else if (v > 48'(half))          return half;
    else                             return v[15:0];
  endfunction

  function automatic logic signed [47:0] on_time(input logic signed [19:0] v, input cnt_t half);
    // half * (16384 + v) / 32768, rounded
    return ((48'sd16384 + 48'(v)) * 48'(signed'({1'b0, half})) + 48'sd16384) >>> 15;
  endfunction

  always_comb begin
    s_a  = 36'(i_ualpha) * 36'(SQRT3_2_Q15);
    s_b  = 36'(i_ubeta) <<< 14;
    va   = 20'(i_ualpha);
    // vb = -Ua/2 + sqrt3/2*Ub ; vc = -Ua/2 - sqrt3/2*Ub
    vb   = 20'(((36'(i_ubeta) * 36'(SQRT3_2_Q15)) - (36'(i_ualpha) <<< 14)) >>> 15);
    vc   = 20'((-(36'(i_ubeta) * 36'(SQRT3_2_Q15)) - (36'(i_ualpha) <<< 14)) >>> 15);
    vmax = va;
    if (vb > vmax) vmax = vb;
    if (vc > vmax) vmax = vc;
    vmin = va;
    if (vb < vmin) vmin = vb;
    if (vc < vmin) vmin = vc;
    voff = -((vmax + vmin) >>> 1);
    on_u = on_time(va + voff, i_half);
    on_v = on_time(vb + voff, i_half);
    on_w = on_time(vc + voff, i_half);
    o_tu = clamp_cnt(on_u, i_half);
    o_tv = clamp_cnt(on_v, i_half);
    o_tw = clamp_cnt(on_w, i_half);

    a_bit = i_ubeta > 16'sd0;
    b_bit = (s_a - s_b) > 36'sd0;
    c_bit = (-s_a - s_b) > 36'sd0;
    n     = {c_bit, b_bit, a_bit};
    case (n)
      3'd3:    o_sector = 3'd1;
      3'd1:    o_sector = 3'd2;
      3'd5:    o_sector = 3'd3;
      3'd4:    o_sector = 3'd4;
      3'd6:    o_sector = 3'd5;
      3'd2:    o_sector = 3'd6;
      default: o_sector = 3'd0;
    endcase
  end

endmodule
