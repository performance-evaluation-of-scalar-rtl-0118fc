// tb_montgomery_multiplier: checks that e * x^233 = c*d mod f (Montgomery
// product with M(x) = x^233) for edge and random operands, and that done follows start
// by exactly 233 clock cycles.
module tb_montgomery_multiplier;
  import tb_gf_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  fe_t  c, d, e;
  logic busy, done;
  int   checks = 0, failures = 0;

  montgomery_multiplier dut (.clk, .rst, .start, .c, .d, .e, .busy, .done);

  always #5 clk = ~clk;

  task automatic run(input fe_t a, input fe_t b);
    int cyc;
    fe_t exp, got;
    @(negedge clk);
    c = a; d = b; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    exp = ref_mul(a, b);
    // e * x^233 = e * (x^74 + 1) mod f
    got = ref_mul(e, (233'(1) << 74) | 233'(1));
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %h * %h -> %h exp %h", a, b, got, exp);
    end
    checks++;
    if (cyc != 234) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = '0; d = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run('0, GX);
    run(233'(1), GX);
    run(GY, 233'(1));
    run('1, '1);
    run(GX, GY);
    run(233'(1) << 232, 233'(1) << 232);
    for (int i = 0; i < 100; i++) run(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
