// tb_proj_to_affine: gives the converter a ladder pair built from reference points
// Q1 = kP and Q2 = (k+1)P in random projective scalings (X = x*Z, Z random, nonzero)
// and checks that (x3, y3) equals Q1; checks done 361 clock edges after the start
// edge (312 for the inverters, 3 stages of 16 cycles, 1 for the done register).
module tb_proj_to_affine;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, done;
  fe_t x1, z1, x2, z2, xp, yp, x3, y3;

  proj_to_affine dut (.clk, .reset, .start, .x1, .z1, .x2, .z2, .xp, .yp, .x3, .y3, .done);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic [162:0] key, input pt_t p);
    int cyc;
    pt_t q1, q2;
    q1 = pt_mul(key, p, 163'd1);
    q2 = pt_add(q1, p, 163'd1);
    z1 = rand_fe(); if (z1 == '0) z1 = 163'd1;
    z2 = rand_fe(); if (z2 == '0) z2 = 163'd1;
    x1 = fmul(q1.x, z1);
    x2 = fmul(q2.x, z2);
    xp = p.x; yp = p.y;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 361, $sformatf("latency %0d", cyc));
    check(x3 == q1.x, $sformatf("x3 k=%h", key));
    check(y3 == q1.y, $sformatf("y3 k=%h", key));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t g, r;
    start = 0;
    g.inf = 0; g.x = B163_GX; g.y = B163_GY;
    r = point_from_seed(rand_fe(), 163'd1, B163_B);
    repeat (3) @(negedge clk);
    reset = 0;
    run(163'd1, g);
    run(163'd5, r);
    for (int n = 0; n < 6; n++) run(rand_fe(), (n % 2) ? g : r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
