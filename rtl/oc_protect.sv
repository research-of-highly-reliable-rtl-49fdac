// oc_protect: overcurrent protection logic.
//
// For every valid current sample the magnitudes of iu, iv and the derived
// third phase iw = -(iu + iv) are compared with i_limit.  If any exceeds it
// the fault latches in the next clock, together with the phase(s) that
// tripped (o_trip bit 0 = U, 1 = V, 2 = W).  The fault stays set until
// i_clear is pulsed while no sample exceeds the limit; the top level uses it
// to switch all gate outputs off within one clock of the sample.
// The source design names an overcurrent protection IP on the 100 MHz clock;
// the threshold rule and the latching are choices of this implementation.
module oc_protect
  import apsoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_valid,
  input  cur_t        i_iu,
  input  cur_t        i_iv,
  input  logic [15:0] i_limit,
  input  logic        i_clear,
  output logic        o_fault,
  output logic [2:0]  o_trip
);

  logic signed [17:0] iw, au, av, aw, lim;
  logic [2:0]         over;

  always_comb begin
    iw   = -(18'(i_iu) + 18'(i_iv));
    au   = i_iu[15] ? -18'(i_iu) : 18'(i_iu);
    av   = i_iv[15] ? -18'(i_iv) : 18'(i_iv);
    aw   = iw[17]   ? -iw        : iw;
    lim  = 18'(signed'({1'b0, i_limit}));
    over = i_valid ? {aw > lim, av > lim, au > lim} : 3'b000;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_fault <= 1'b0;
      o_trip  <= '0;
    end else if (over != 3'b000) begin
      o_fault <= 1'b1;
      o_trip  <= o_trip | over;
    end else if (i_clear) begin
      o_fault <= 1'b0;
      o_trip  <= '0;
    end
  end

endmodule
