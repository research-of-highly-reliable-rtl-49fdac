// tb_adc_if: runs acquisitions against the AD7606 model at 50 MHz with
// random channel values and checks the returned samples, the bus sequence
// (two RD strobes inside one CS-low window, no RD before BUSY falls), the
// acquisition time, and the BUSY timeout path.
module tb_adc_if;
  import apsoc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, err, cs_n, rd_n, convst, busy, hang = 0;
  logic [15:0] db, c1, c2;
  cur_t o1, o2;
  int convs, rd_edges, checks = 0, failures = 0;
  adc_if #(.BUSY_TIMEOUT(400)) dut (.clk, .rst_n, .i_start(start), .iv_data(db), .i_busy(busy),
    .o_done(done), .o_err(err), .o_cs_n(cs_n), .o_rd_n(rd_n), .o_convst(convst), .ov_ch1(o1), .ov_ch2(o2));
  ad7606_model #(.CONV_NS(4000)) adc (.convst, .cs_n, .rd_n, .ch1(c1), .ch2(c2), .no_busy_fall(hang),
    .busy, .db, .conversions(convs));
  always #10 clk = !clk;   // 50 MHz
  always @(negedge rd_n) begin
    rd_edges++;
    if (cs_n || busy) begin failures++; $display("FAIL RD while CS high or BUSY"); end
  end

  initial begin
    c1 = 0; c2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      int cyc;
      c1 = 16'($urandom); c2 = 16'($urandom);
      rd_edges = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (o1 != c1 || o2 != c2 || err) begin failures++; $display("FAIL data %h %h exp %h %h", o1, o2, c1, c2); end
      checks++;
      if (rd_edges != 2) begin failures++; $display("FAIL rd strobes %0d", rd_edges); end
      // 4 us conversion = 200 clocks plus CONVST, settle and read phases
      checks++;
      if (cyc < 200 || cyc > 220) begin failures++; $display("FAIL acquisition time %0d clocks", cyc); end
      repeat (5) @(posedge clk);
    end
    checks++;
    if (convs != 20) begin failures++; $display("FAIL conversions %0d", convs); end
    // hung converter: timeout flags an error and keeps the old data
    hang = 1; c1 = 16'h1234;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (!err || o1 == 16'h1234) begin failures++; $display("FAIL timeout err=%0d", err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
