// tb_clarke: checks the Clarke transform against i_beta = (iu + 2 iv)/sqrt(3)
// computed in floating point, for random currents and at saturation.
module tb_clarke;
  import apsoc_pkg::*;
  import tb_ref_pkg::*;
  cur_t iu, iv, ia, ib;
  int checks = 0, failures = 0;
  clarke dut (.i_iu(iu), .i_iv(iv), .o_ialpha(ia), .o_ibeta(ib));
  initial begin
    for (int n = 0; n < 500; n++) begin
      real rb;
      iu = cur_t'($urandom_range(0, 24000)) - 16'sd12000;
      iv = cur_t'($urandom_range(0, 24000)) - 16'sd12000;
      #1;
      rb = (real'(iu) + 2.0*real'(iv)) / $sqrt(3.0);
      rb = clampr(rb, -32768.0, 32767.0);
      checks++;
      if (ia != iu || absr(real'(ib) - rb) > 1.0) begin
        failures++;
        $display("FAIL iu=%0d iv=%0d alpha=%0d beta=%0d ref=%f", iu, iv, ia, ib, rb);
      end
    end
    iu = 16'sd30000; iv = 16'sd30000; #1;
    checks++; if (ib != 16'sh7fff) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
