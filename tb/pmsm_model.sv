// pmsm_model: behavioural electrical model of a surface PMSM fed by a
// two-level inverter, for closed-loop testbenches (not synthesizable).
//
// Over each PWM period (between interrupts) it counts, per leg, the clocks
// with the high switch on, the low switch on, and both off.  During dead
// time the freewheeling diode sets the pole voltage by the current sign
// (low diode for positive current, high diode for negative).  The average
// pole voltages, minus their mean, are the phase voltages.  The stator
// equations in the stationary frame, with a back-EMF proportional to speed,
//   L di/dt = v - R i - e,  e_alpha = -w*psi*sin(theta), e_beta = w*psi*cos(theta),
// are integrated with SUBSTEPS Euler steps per period.  The rotor turns at a
// constant electrical speed of dtheta counts (65536 per turn) per period.
// Units: voltage 32768 = Vdc, current in ADC counts; l_over_ts = L/Ts.
module pmsm_model #(
  parameter real R        = 0.05,     // voltage units per current count
  parameter real L_OVER_TS = 3.0,     // L / Ts
  parameter real E_AMP    = 1500.0,   // back-EMF amplitude per 100 counts/period of speed
  parameter int  SUBSTEPS = 16
) (
  input  logic clk,
  input  logic irq,
  input  logic up, un, vp, vn, wp, wn,
  input  int   dtheta,
  output real  ia, ib, ic,
  output int   theta
);
  int hi [3], lo [3], off [3], total;
  real pi_c = 3.14159265358979;
  initial begin ia = 0.0; ib = 0.0; ic = 0.0; theta = 0; total = 0;
    for (int k = 0; k < 3; k++) begin hi[k] = 0; lo[k] = 0; off[k] = 0; end
  end
  always @(posedge clk) begin
    if (irq) begin
      real vpole [3], vm, va, vb, vc, cur [3], th, w_psi_a, w_psi_b, dt;
      if (total > 0) begin
        cur[0] = ia; cur[1] = ib; cur[2] = ic;
        for (int k = 0; k < 3; k++) begin
          vpole[k] = 32768.0 * (real'(hi[k]) + (cur[k] < 0.0 ? real'(off[k]) : 0.0)) / real'(total);
        end
        vm = (vpole[0] + vpole[1] + vpole[2]) / 3.0;
        va = vpole[0] - vm; vb = vpole[1] - vm; vc = vpole[2] - vm;
        dt = 1.0 / real'(SUBSTEPS);
        for (int s = 0; s < SUBSTEPS; s++) begin
          real ial, ibe, val, vbe, eal, ebe;
          th  = 2.0 * pi_c * (real'(theta) + real'(dtheta) * real'(s) / real'(SUBSTEPS)) / 65536.0;
          ial = ia; ibe = (ia + 2.0*ib) / $sqrt(3.0);
          val = va; vbe = (va + 2.0*vb) / $sqrt(3.0);
          eal = -E_AMP * real'(dtheta) / 100.0 * $sin(th);
          ebe =  E_AMP * real'(dtheta) / 100.0 * $cos(th);
          ial += dt * (val - R*ial - eal) / L_OVER_TS;
          ibe += dt * (vbe - R*ibe - ebe) / L_OVER_TS;
          ia = ial;
          ib = -0.5*ial + 0.5*$sqrt(3.0)*ibe;
          ic = -ia - ib;
        end
        theta = (theta + dtheta) % 65536;
      end
      for (int k = 0; k < 3; k++) begin hi[k] = 0; lo[k] = 0; off[k] = 0; end
      total = 0;
    end else begin
      total++;
      hi[0] += int'(up); lo[0] += int'(un); off[0] += int'(!up && !un);
      hi[1] += int'(vp); lo[1] += int'(vn); off[1] += int'(!vp && !vn);
      hi[2] += int'(wp); lo[2] += int'(wn); off[2] += int'(!wp && !wn);
    end
  end
endmodule
