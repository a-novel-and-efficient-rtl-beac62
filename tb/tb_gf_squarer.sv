// tb_gf_squarer: checks the combinational squarer against a*a computed with the
// bit-serial reference multiplier.
module tb_gf_squarer;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  fe_t a, c;

  gf_squarer dut (.a(a), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      if (n < 163) a = 163'd1 << n;
      else         a = rand_fe();
      #1;
      checks++;
      if (c !== fmul(a, a)) begin
        failures++;
        $display("FAIL a=%h got %h exp %h", a, c, fmul(a, a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
