// pulse_sync: carries single-clock pulses between two unrelated clocks.
//
// Each source pulse toggles a flag; the flag passes a two-flop synchroniser
// in the destination domain and every change of the synchronised flag gives
// one destination pulse, 2 to 3 destination clocks after the source pulse.
// Source pulses must be at least three destination clocks apart.  Data that
// accompanies the pulse must be held stable by the sender until it has been
// taken, which all users here guarantee (results are held until the next
// request, a PWM period later).
// The synchroniser style is a choice of this implementation.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic i_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic o_pulse
);

  logic tog_q;
  logic [2:0] sync_q;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)   tog_q <= 1'b0;
    else if (i_pulse) tog_q <= !tog_q;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) sync_q <= '0;
    else            sync_q <= {sync_q[1:0], tog_q};
  end

  assign o_pulse = sync_q[2] ^ sync_q[1];

endmodule
