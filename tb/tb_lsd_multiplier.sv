// tb_lsd_multiplier: runs the digit-serial multiplier at its default digit size
// (G = 41, 4 digits) and at G = 11 (15 digits) on corner and random operands,
// checks c against the reference product, checks that done arrives exactly NDIG
// cycles after the start cycle's clock edge, and that a restart while busy works.
module tb_lsd_multiplier;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic s41, s11, done41, done11, busy41, busy11;
  fe_t a, b, c41, c11;

  lsd_multiplier              dut41 (.clk, .reset, .start(s41), .a, .b, .c(c41), .done(done41), .busy(busy41));
  lsd_multiplier #(.G(11))    dut11 (.clk, .reset, .start(s11), .a, .b, .c(c11), .done(done11), .busy(busy11));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Start one multiplier, count cycles to done, check result and latency.
  task automatic mult(input fe_t x, input fe_t y, input bit use41);
    int cyc;
    fe_t exp;
    exp = fmul(x, y);
    @(negedge clk);
    a = x; b = y;
    if (use41) s41 = 1; else s11 = 1;
    @(negedge clk);
    s41 = 0; s11 = 0;
    a = rand_fe(); b = rand_fe();         // inputs are sampled only at start
    cyc = 0;
    while (!(use41 ? done41 : done11)) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == (use41 ? 4 : 15), $sformatf("latency G=%0d: %0d", use41 ? 41 : 11, cyc));
    check((use41 ? c41 : c11) == exp, $sformatf("product G=%0d a=%h b=%h", use41 ? 41 : 11, x, y));
    @(negedge clk);
    check((use41 ? c41 : c11) == exp, "result holds after done");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s41 = 0; s11 = 0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    mult('1, '1, 1);            mult('1, '1, 0);
    mult(163'd1, 163'd1 << 162, 1); mult(163'd1, 163'd1 << 162, 0);
    mult(163'd1 << 162, 163'd1 << 162, 1); mult(163'd1 << 162, 163'd1 << 162, 0);
    mult('0, rand_fe(), 1);
    for (int n = 0; n < 60; n++) begin
      mult(rand_fe(), rand_fe(), 1);
      mult(rand_fe(), rand_fe(), 0);
    end
    // Restart in the middle of a multiplication: the second start wins.
    begin
      fe_t x, y;
      x = rand_fe(); y = rand_fe();
      @(negedge clk); a = rand_fe(); b = rand_fe(); s11 = 1;
      @(negedge clk); s11 = 0;
      repeat (5) @(negedge clk);
      check(busy11 && !done11, "busy during multiplication");
      a = x; b = y; s11 = 1;
      @(negedge clk); s11 = 0;
      repeat (15) @(negedge clk);
      check(done11 && c11 == fmul(x, y), "restart while busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
