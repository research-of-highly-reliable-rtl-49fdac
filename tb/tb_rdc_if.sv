// tb_rdc_if: reads random angles from the AD2S1210 model and checks the
// value, the command word seen on MOSI, the read time of
// 2*SCLK_DIV*16 + 2 clocks, and the SCLK rate, for two clock dividers.
module tb_rdc_if;
  import apsoc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic done_a, cs_a, fs_a, sclk_a, mosi_a, miso_a;
  logic done_b, cs_b, fs_b, sclk_b, mosi_b, miso_b;
  ang_t ang_a, ang_b;
  logic [15:0] angle, cmd_a, cmd_b;
  int reads_a, reads_b, checks = 0, failures = 0;
  rdc_if dut_a (.clk, .rst_n, .i_start(start), .i_miso(miso_a), .o_done(done_a), .o_cs_n(cs_a),
    .o_fsync_n(fs_a), .o_sclk(sclk_a), .o_mosi(mosi_a), .ov_angle(ang_a));
  rdc_if #(.SCLK_DIV(5), .CMD(32'h0000_a55a)) dut_b (.clk, .rst_n, .i_start(start), .i_miso(miso_b),
    .o_done(done_b), .o_cs_n(cs_b), .o_fsync_n(fs_b), .o_sclk(sclk_b), .o_mosi(mosi_b), .ov_angle(ang_b));
  ad2s1210_model rdc_a (.cs_n(cs_a), .fsync_n(fs_a), .sclk(sclk_a), .sdi(mosi_a), .angle, .sdo(miso_a), .cmd_rx(cmd_a), .reads(reads_a));
  ad2s1210_model rdc_b (.cs_n(cs_b), .fsync_n(fs_b), .sclk(sclk_b), .sdi(mosi_b), .angle, .sdo(miso_b), .cmd_rx(cmd_b), .reads(reads_b));
  always #10 clk = !clk;
  initial begin
    angle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      int cyc_a, cyc_b;
      angle = 16'($urandom);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc_a = 0; cyc_b = 0;
      for (int c = 1; c < 400 && (cyc_a == 0 || cyc_b == 0); c++) begin
        if (done_a && cyc_a == 0) cyc_a = c;
        if (done_b && cyc_b == 0) cyc_b = c;
        @(negedge clk);
      end
      checks += 4;
      if (ang_a != angle) begin failures++; $display("FAIL a %h exp %h", ang_a, angle); end
      if (ang_b != angle) begin failures++; $display("FAIL b %h exp %h", ang_b, angle); end
      if (cmd_a != 16'h8000 || cmd_b != 16'ha55a) begin failures++; $display("FAIL cmd %h %h", cmd_a, cmd_b); end
      if (cyc_a != 2*2*16 + 2 || cyc_b != 2*5*16 + 2) begin failures++; $display("FAIL time %0d %0d", cyc_a, cyc_b); end
    end
    checks++;
    if (reads_a != 30) begin failures++; $display("FAIL reads %0d", reads_a); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
