// reset_sync: asynchronous assertion, synchronous release of an active-low
// reset in one clock domain (two flops).  Lint notes that these flops use
// the reset both as asynchronous clear and, through the shift, as data; that
// is the purpose of the circuit.
// The synchroniser style is a choice of this implementation.
module reset_sync (
  input  logic clk,
  input  logic i_rst_n,
  output logic o_rst_n
);

  logic [1:0] q;

  always_ff @(posedge clk or negedge i_rst_n) begin
    if (!i_rst_n) q <= '0;
    else          q <= {q[0], 1'b1};
  end

  assign o_rst_n = q[1];

endmodule
