// tb_ladder_unit: runs the full 163-bit ladder (G = 41) for several keys and base
// points and checks that X1/Z1 is the x-coordinate of kP and X2/Z2 that of (k+1)P,
// both from affine double-and-add in the reference package (Z = 0 for the point at
// infinity). Checks done 163*12 + 1 = 1957 clock edges after the start edge.
module tb_ladder_unit;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, done, busy;
  logic [162:0] k;
  fe_t xp, b, x1, z1, x2, z2;

  ladder_unit dut (.clk, .reset, .start, .k, .xp, .b, .x1, .z1, .x2, .z2, .done, .busy);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_x(input fe_t xx, input fe_t zz, input pt_t q, input string what);
    if (q.inf) check(zz == '0, {what, " at infinity"});
    else       check(zz != '0 && fmul(xx, finv(zz)) == q.x, what);
  endtask

  task automatic run(input logic [162:0] key, input pt_t p, input fe_t bb);
    int cyc;
    pt_t q1, q2;
    q1 = pt_mul(key, p, 163'd1);
    q2 = pt_add(q1, p, 163'd1);
    @(negedge clk);
    k = key; xp = p.x; b = bb; start = 1;
    @(negedge clk);
    start = 0;
    k = '0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 1957, $sformatf("latency %0d", cyc));
    check_x(x1, z1, q1, $sformatf("x(kP) k=%h", key));
    check_x(x2, z2, q2, $sformatf("x((k+1)P) k=%h", key));
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
    start = 0; k = '0; xp = '0; b = '0;
    g.inf = 0; g.x = B163_GX; g.y = B163_GY;
    check(on_curve(g, 163'd1, B163_B), "B-163 generator on curve");
    r = point_from_seed(rand_fe(), 163'd1, B163_B);
    check(on_curve(r, 163'd1, B163_B), "seeded point on curve");
    repeat (3) @(negedge clk);
    reset = 0;
    run(163'd1, g, B163_B);
    run(163'd2, g, B163_B);
    run(163'd7, r, B163_B);
    run({1'b1, 162'd0}, g, B163_B);
    run(rand_fe(), g, B163_B);
    run(rand_fe(), r, B163_B);
    run(rand_fe() >> 40, r, B163_B);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
