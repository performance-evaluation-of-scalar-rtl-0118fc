// tb_gf_divider: checks quo * den = num (mod f) for edge and random
// operands and that every division finishes within 466 cycles; also
// records the shortest and longest latency seen.
module tb_gf_divider;
  import tb_gf_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  fe_t  num, den, quo;
  logic busy, done;
  int   checks = 0, failures = 0, min_cyc = 1 << 30, max_cyc = 0;

  gf_divider dut (.clk, .rst, .start, .num, .den, .quo, .busy, .done);

  always #5 clk = ~clk;

  task automatic run(input fe_t n, input fe_t dd);
    int cyc;
    @(negedge clk);
    num = n; den = dd; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 2000) begin
      @(negedge clk);
      cyc++;
    end
    if (cyc < min_cyc) min_cyc = cyc;
    if (cyc > max_cyc) max_cyc = cyc;
    checks++;
    if (ref_mul(quo, dd) !== n) begin
      failures++;
      $display("FAIL %h / %h = %h", n, dd, quo);
    end
    checks++;
    if (cyc > 466) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    num = '0; den = 233'(1);
    repeat (3) @(negedge clk);
    rst = 0;
    run(GY, 233'(1));
    run(233'(1), GX);
    run('0, GX);
    run(GY, GX);
    run('1, 233'(1) << 232);
    run(233'(1), '1);
    run(GX, GX);
    for (int i = 0; i < 150; i++) begin
      fe_t dd;
      dd = rand_fe();
      if (dd == '0) dd = 233'(1);
      run(rand_fe(), dd);
    end
    $display("divider latency min %0d max %0d cycles", min_cyc, max_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
