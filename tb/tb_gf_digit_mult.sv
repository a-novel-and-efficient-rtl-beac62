// tb_gf_digit_mult: checks the carry-less m x G digit product at G = 41 and G = 11
// against a shift-and-XOR reference, on random and corner operands.
module tb_gf_digit_mult;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  fe_t a;
  logic [40:0] b41;
  logic [10:0] b11;
  logic [163+41-2:0] d41;
  logic [163+11-2:0] d11;

  gf_digit_mult #(.G(41)) dut41 (.a(a), .b(b41), .d(d41));
  gf_digit_mult #(.G(11)) dut11 (.a(a), .b(b11), .d(d11));

  task automatic run_one();
    logic [324:0] e41, e11;
    #1;
    e41 = clmul(a, 163'(b41));
    e11 = clmul(a, 163'(b11));
    checks += 2;
    if (325'(d41) !== e41) begin failures++; $display("FAIL G=41 a=%h b=%h", a, b41); end
    if (325'(d11) !== e11) begin failures++; $display("FAIL G=11 a=%h b=%h", a, b11); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b41 = '1; b11 = '1; run_one();
    a = 163'd1; b41 = 41'd1 << 40; b11 = 11'd1 << 10; run_one();
    a = 163'd1 << 162; b41 = 41'd1 << 40; b11 = 11'd1 << 10; run_one();
    for (int n = 0; n < 300; n++) begin
      a = rand_fe(); b41 = 41'({$urandom, $urandom}); b11 = 11'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
