// tb_oc_protect: random current samples against a random threshold; the
// fault must latch exactly when |iu|, |iv| or |iu+iv| exceeds it, report the
// phase(s), ignore samples without i_valid, hold until cleared, and clear
// only when the current sample is within the limit.
module tb_oc_protect;
  import apsoc_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0, clr = 0, fault;
  logic [2:0] trip;
  cur_t iu, iv;
  logic [15:0] lim;
  int checks = 0, failures = 0, trips = 0;
  oc_protect dut (.clk, .rst_n, .i_valid(valid), .i_iu(iu), .i_iv(iv), .i_limit(lim), .i_clear(clr),
                  .o_fault(fault), .o_trip(trip));
  always #5 clk = !clk;
  initial begin
    iu = 0; iv = 0; lim = 10000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int a, b, w;
      logic [2:0] exp_t;
      a = $urandom_range(0, 28000) - 14000;
      b = $urandom_range(0, 28000) - 14000;
      w = -(a + b);
      exp_t = {(w < 0 ? -w : w) > 10000, (b < 0 ? -b : b) > 10000, (a < 0 ? -a : a) > 10000};
      iu = cur_t'(a); iv = cur_t'(b);
      @(negedge clk) valid = (n % 5 != 0);
      @(negedge clk) valid = 0;
      checks++;
      if (n % 5 == 0) begin
        if (fault) begin failures++; $display("FAIL trip without valid"); end
      end else if (fault != (exp_t != 0) || trip != exp_t) begin
        failures++; $display("FAIL iu=%0d iv=%0d fault=%0d trip=%b exp %b", a, b, fault, trip, exp_t);
      end
      if (fault) trips++;
      // fault holds after the sample goes away
      iu = 0; iv = 0;
      @(negedge clk);
      checks++;
      if (fault != (exp_t != 0 && n % 5 != 0)) begin failures++; $display("FAIL hold"); end
      clr = 1; @(negedge clk) clr = 0;
      checks++;
      if (fault) begin failures++; $display("FAIL clear"); end
    end
    // clear ignored while the sample is still over the limit
    iu = 16'sd20000; iv = 0; valid = 1; clr = 1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (!fault) begin failures++; $display("FAIL clear during overcurrent"); end
    checks++;
    if (trips == 0) begin failures++; $display("FAIL never tripped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
