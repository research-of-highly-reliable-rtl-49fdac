// ad7606_model: behavioural model of an AD7606 ADC's parallel read-out for
// the testbenches (not synthesizable).  A rising CONVST edge raises BUSY
// 40 ns later for CONV_NS; each falling RD edge while CS is low drives the
// next channel (starting at channel 1 after every conversion) onto DB 20 ns
// later.  Channel values come from the ch1/ch2 inputs at the CONVST edge.
// no_busy_fall keeps BUSY high forever (a hung converter).
module ad7606_model #(
  parameter int CONV_NS = 4000
) (
  input  logic        convst,
  input  logic        cs_n,
  input  logic        rd_n,
  input  logic [15:0] ch1,
  input  logic [15:0] ch2,
  input  logic        no_busy_fall,
  output logic        busy,
  output logic [15:0] db,
  output int          conversions
);
  logic [15:0] hold [2];
  int idx;
  initial begin busy = 0; db = 16'h0; idx = 0; conversions = 0; end
  always @(posedge convst) begin
    hold[0] = ch1; hold[1] = ch2;
    idx = 0;
    conversions++;
    #40 busy = 1;
    #(CONV_NS) if (!no_busy_fall) busy = 0;
  end
  always @(negedge rd_n) begin
    if (!cs_n) begin
      #20 db = hold[idx % 2];
      idx++;
    end
  end
endmodule
