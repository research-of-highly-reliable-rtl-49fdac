// sincos_cordic: sine and cosine of the rotor angle for the Park transforms.
//
// An iterative CORDIC in rotation mode, one micro-rotation per clock.  The
// angle (16 bit, 65536 per turn) is first folded into -90..+90 degrees by
// rotating through 180 degrees when needed (the result is then negated), and
// extended to 20 bits so that the arctangent table keeps its precision.  The
// start vector is pre-scaled by the CORDIC gain 1/K = 0.60725 so the outputs
// come out in Q2.14 without a final multiplication.  Four guard bits are kept
// in x and y and rounded off at the end.
//
// Interface: pulse i_start with i_theta valid; ITER+1 clocks later o_done
// pulses for one clock and o_sin/o_cos hold the result until the next start.
// The source design only names sin(theta) and cos(theta); the CORDIC method
// and all widths are choices of this implementation.
module sincos_cordic
  import apsoc_pkg::*;
#(
  parameter int unsigned ITER = 16   // micro-rotations, at most 18
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  i_start,
  input  ang_t  i_theta,
  output logic  o_done,
  output trig_t o_sin,
  output trig_t o_cos
);

  localparam int unsigned ZW = 21;   // signed angle, 2^20 per turn
  localparam int unsigned XW = 22;   // Q14 plus 4 guard bits, signed

  // atan(2^-i) * 2^20 / (2*pi), rounded
  function automatic logic signed [ZW-1:0] atan_tab(input logic [4:0] i);
    case (i)
      0: return 21'sd131072;  1: return 21'sd77376;  2: return 21'sd40884;
      3: return 21'sd20753;   4: return 21'sd10417;  5: return 21'sd5213;
      6: return 21'sd2607;    7: return 21'sd1304;   8: return 21'sd652;
      9: return 21'sd326;    10: return 21'sd163;   11: return 21'sd81;
     12: return 21'sd41;     13: return 21'sd20;    14: return 21'sd10;
     15: return 21'sd5;      16: return 21'sd3;     17: return 21'sd1;
      default: return 21'sd0;
    endcase
  endfunction

  // 0.6072529 * 2^18 (Q14 with four guard bits)
  localparam logic signed [XW-1:0] X_INIT = 22'sd159188;

  logic signed [XW-1:0] x_q, y_q;
  logic signed [ZW-1:0] z_q;
  logic                 neg_q;
  logic [4:0]           it_q;
  logic                 busy_q;

  // quadrant folding of the start angle
  logic signed [15:0] th_s;
  logic signed [15:0] th_f;
  logic               fold;
  always_comb begin
    th_s = signed'(i_theta);
    fold = (th_s > 16'sd16384) || (th_s < -16'sd16384);
    th_f = th_s + 16'sh8000;          // rotate by 180 degrees (wraps)
    if (!fold) th_f = th_s;
  end

  logic signed [XW-1:0] x_sh, y_sh;
  logic                 dir_pos;
  always_comb begin
    x_sh    = x_q >>> it_q;
    y_sh    = y_q >>> it_q;
    dir_pos = !z_q[ZW-1];
  end

  function automatic trig_t round_out(input logic signed [XW-1:0] v, input logic neg);
    logic signed [XW-1:0] r;
    r = (v + 22'sd8) >>> 4;
    if (neg) r = -r;
    if (r > 22'sd32767)       return 16'sh7fff;
    else if (r < -22'sd32768) return 16'sh8000;
    else                      return r[15:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      y_q    <= '0;
      z_q    <= '0;
      neg_q  <= 1'b0;
      it_q   <= '0;
      busy_q <= 1'b0;
      o_done <= 1'b0;
      o_sin  <= '0;
      o_cos  <= 16'sd16384;
    end else begin
      o_done <= 1'b0;
      if (i_start) begin
        x_q    <= X_INIT;
        y_q    <= '0;
        z_q    <= ZW'(th_f) <<< 4;
        neg_q  <= fold;
        it_q   <= '0;
        busy_q <= 1'b1;
      end else if (busy_q) begin
        if (dir_pos) begin
          x_q <= x_q - y_sh;
          y_q <= y_q + x_sh;
          z_q <= z_q - atan_tab(it_q);
        end else begin
          x_q <= x_q + y_sh;
          y_q <= y_q - x_sh;
          z_q <= z_q + atan_tab(it_q);
        end
        if (it_q == 5'(ITER - 1)) begin
          busy_q <= 1'b0;
          o_done <= 1'b1;
        end
        it_q <= it_q + 5'd1;
      end
      if (busy_q && !i_start && it_q == 5'(ITER - 1)) begin
        // results of the last micro-rotation
        o_cos <= round_out(dir_pos ? x_q - y_sh : x_q + y_sh, neg_q);
        o_sin <= round_out(dir_pos ? y_q + x_sh : y_q - x_sh, neg_q);
      end
    end
  end

endmodule
