// tb_itmia_inverter: runs the Itoh-Tsujii inverter (G = 11) on corner and random
// inputs; checks out against Fermat inversion from the reference package, that
// in * out = 1, that 0 maps to 0, and the latency: done 312 clock edges after the
// edge that samples start (9 multiplications of 17 cycles, 158 repeated squarings,
// entry and final squaring).
module tb_itmia_inverter;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, done, busy;
  fe_t in, out;

  itmia_inverter dut (.clk, .reset, .start, .inversion_in(in), .inversion_out(out), .done, .busy);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic invert(input fe_t x);
    int cyc;
    @(negedge clk);
    in = x; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 312, $sformatf("latency %0d", cyc));
    check(out == finv(x), $sformatf("inverse of %h: got %h", x, out));
    if (x != '0) check(fmul(x, out) == 163'd1, "x * x^-1 == 1");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; in = '0;
    repeat (3) @(negedge clk);
    reset = 0;
    invert(163'd1);
    invert(163'd2);
    invert('1);
    invert('0);
    invert(163'd1 << 162);
    for (int n = 0; n < 20; n++) invert(rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
