// tb_gf_reduce: checks gf_reduce at EXT = 41 and EXT = 10 against long division
// modulo P(x), on random inputs and on each single high bit.
module tb_gf_reduce;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [163+41-1:0] d41;
  logic [163+10-1:0] d10;
  fe_t c41, c10;

  gf_reduce #(.EXT(41)) dut41 (.d(d41), .c(c41));
  gf_reduce #(.EXT(10)) dut10 (.d(d10), .c(c10));

  task automatic check(input fe_t got, input fe_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 41; i++) begin
      d41 = '0; d41[163+i] = 1'b1; d10 = '0; d10[163 + (i % 10)] = 1'b1;
      #1;
      check(c41, fmod(325'(d41)), "single bit 41");
      check(c10, fmod(325'(d10)), "single bit 10");
    end
    for (int n = 0; n < 200; n++) begin
      d41 = {rand_fe(), 41'({$urandom, $urandom})};
      d10 = {rand_fe(), 10'($urandom)};
      #1;
      check(c41, fmod(325'(d41)), "random 41");
      check(c10, fmod(325'(d10)), "random 10");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
