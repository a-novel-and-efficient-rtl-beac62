// tb_point_add_dbl: drives the projective addition/doubling unit (G = 41) with random
// projective coordinates and checks the four outputs against the Lopez-Dahab
// formulas evaluated with the reference field arithmetic; checks done 2*4+2 = 10
// clock edges after the start edge and the starting values shown while init is high.
module tb_point_add_dbl;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, init, done;
  fe_t xp, b, ax1, az1, ax2, az2, dx, dz;
  fe_t aox, aoz, dox, doz;

  point_add_dbl dut (.clk, .reset, .start, .init, .xp, .b,
    .add_in_x1(ax1), .add_in_z1(az1), .add_in_x2(ax2), .add_in_z2(az2),
    .dob_in_x(dx), .dob_in_z(dz),
    .add_out_x(aox), .add_out_z(aoz), .dob_out_x(dox), .dob_out_z(doz), .done);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step();
    int cyc;
    fe_t zadd, xadd, xdbl, zdbl;
    xp = rand_fe(); b = rand_fe();
    ax1 = rand_fe(); az1 = rand_fe(); ax2 = rand_fe(); az2 = rand_fe();
    dx = rand_fe(); dz = rand_fe();
    zadd = fsq(fmul(ax1, az2) ^ fmul(ax2, az1));
    xadd = fmul(xp, zadd) ^ fmul(fmul(ax1, az2), fmul(ax2, az1));
    xdbl = fsq(fsq(dx)) ^ fmul(b, fsq(fsq(dz)));
    zdbl = fmul(fsq(dx), fsq(dz));
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 10, $sformatf("latency %0d", cyc));
    check(aox == xadd, "X of addition");
    check(aoz == zadd, "Z of addition");
    check(dox == xdbl, "X of doubling");
    check(doz == zdbl, "Z of doubling");
    init = 1;
    #1;
    check(aox == xp && aoz == 163'd1 && dox == 163'd1 && doz == '0, "init values");
    init = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; init = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int n = 0; n < 40; n++) step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
