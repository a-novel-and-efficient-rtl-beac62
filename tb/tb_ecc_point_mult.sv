// tb_ecc_point_mult: end-to-end test of the scalar point multiplier at its default
// parameters (G1 = 41, G2 = 11, 163-bit keys). For each key and base point it checks
// (x3, y3) against affine double-and-add from the reference package, that the result
// lies on the curve, and the fixed latency of 2321 clock edges from the start edge.
// It uses the NIST B-163 generator, a derived point of B-163 and the K-163 generator
// (b = 1). It also counts how often each mechanism of the design was exercised and
// fails if one never was: loading the starting pair (O, P), ladder steps with key bit
// 1 and 0, a change of key bit between steps (the doubling input switches point),
// steps on leading zero bits (the pair stays (O, P)), single squarings and squaring
// runs in the inverters, and the repeated X1*Z1^-1 of the conversion's last stage.
module tb_ecc_point_mult;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start, done, busy;
  logic [162:0] k;
  fe_t xp, yp, b, x3, y3;

  ecc_point_mult dut (.clk, .reset, .start, .k, .xp, .yp, .b, .x3, .y3, .done, .busy);

  // Mechanism counters, sampled from the design's own control signals.
  int n_init = 0, n_bit1 = 0, n_bit0 = 0, n_change = 0, n_lead0 = 0;
  int n_sq_single = 0, n_sq_run = 0, n_recompute = 0;
  logic prev_bit, have_prev;

  always @(posedge clk) if (!reset) begin
    if (dut.u_ladder.init) begin
      n_init++;
      have_prev <= 1'b0;
    end
    if (dut.u_ladder.state_q == 2'd3 && dut.u_ladder.pad_done) begin
      if (dut.u_ladder.k_m) n_bit1++; else n_bit0++;
      if (dut.u_ladder.z1 == '0 && !dut.u_ladder.k_m) n_lead0++;
      if (have_prev && prev_bit != dut.u_ladder.k_m) n_change++;
      prev_bit  <= dut.u_ladder.k_m;
      have_prev <= 1'b1;
    end
    if (dut.u_conv.u_inv_z1.mul_start) begin
      if (dut.u_conv.u_inv_z1.single_sq) n_sq_single++; else n_sq_run++;
    end
    if (dut.u_conv.stage_c) n_recompute++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic [162:0] key, input pt_t p, input fe_t bb);
    int cyc;
    pt_t q;
    q = pt_mul(key, p, 163'd1);
    @(negedge clk);
    k = key; xp = p.x; yp = p.y; b = bb; start = 1;
    @(negedge clk);
    start = 0;
    k = '0; xp = '0; yp = '0; b = '0;      // inputs are sampled at start
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 2321, $sformatf("latency %0d", cyc));
    check(!q.inf, "reference result is a finite point");
    check(x3 == q.x, $sformatf("x3 k=%h: got %h exp %h", key, x3, q.x));
    check(y3 == q.y, $sformatf("y3 k=%h: got %h exp %h", key, y3, q.y));
    begin
      pt_t got;
      got.inf = 1'b0; got.x = x3; got.y = y3;
      check(on_curve(got, 163'd1, bb), "result on the curve");
    end
    check(!busy, "idle after done");
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t g, kg, r;
    start = 0; k = '0; xp = '0; yp = '0; b = '0; have_prev = 1'b0; prev_bit = 1'b0;
    g.inf = 0;  g.x = B163_GX;  g.y = B163_GY;
    kg.inf = 0; kg.x = K163_GX; kg.y = K163_GY;
    check(on_curve(g, 163'd1, B163_B), "B-163 generator on curve");
    check(on_curve(kg, 163'd1, 163'd1), "K-163 generator on curve");
    r = point_from_seed(rand_fe(), 163'd1, B163_B);
    repeat (3) @(negedge clk);
    reset = 0;
    run(163'd1, g, B163_B);
    run(163'd2, g, B163_B);
    run(163'd3, r, B163_B);
    run(rand_fe(), g, B163_B);
    run({1'b1, 162'(rand_fe())}, kg, 163'd1);
    run(rand_fe() >> 80, r, B163_B);
    $display("mechanisms: init=%0d bit1=%0d bit0=%0d change=%0d lead0=%0d sq_single=%0d sq_run=%0d recompute=%0d",
             n_init, n_bit1, n_bit0, n_change, n_lead0, n_sq_single, n_sq_run, n_recompute);
    check(n_init > 0, "starting pair loaded");
    check(n_bit1 > 0, "key bit 1 steps");
    check(n_bit0 > 0, "key bit 0 steps");
    check(n_change > 0, "key bit changes");
    check(n_lead0 > 0, "leading zero steps");
    check(n_sq_single > 0, "single squarings in inverter");
    check(n_sq_run > 0, "squaring runs in inverter");
    check(n_recompute > 0, "x3 recomputed in last stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
