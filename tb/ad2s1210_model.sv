// ad2s1210_model: behavioural model of the serial read-out of an AD2S1210
// resolver-to-digital converter for the testbenches (not synthesizable).
// Falling FSYNC (with CS low) latches the angle and drives its MSB on SDO;
// every following falling SCLK edge drives the next bit.  The bits received
// on SDI (sampled on rising SCLK) are collected in cmd_rx.
module ad2s1210_model (
  input  logic        cs_n,
  input  logic        fsync_n,
  input  logic        sclk,
  input  logic        sdi,
  input  logic [15:0] angle,
  output logic        sdo,
  output logic [15:0] cmd_rx,
  output int          reads
);
  logic [15:0] sh;
  int nbit;
  initial begin sdo = 0; nbit = 0; reads = 0; cmd_rx = 0; end
  always @(negedge fsync_n) begin
    if (!cs_n) begin
      sh = angle; nbit = 0; sdo = sh[15]; reads++;
    end
  end
  always @(posedge sclk) begin
    if (!fsync_n) begin
      cmd_rx = {cmd_rx[14:0], sdi};
      nbit++;
    end
  end
  always @(negedge sclk) begin
    if (!fsync_n && nbit > 0 && nbit < 16) sdo = sh[15 - nbit];
  end
endmodule
