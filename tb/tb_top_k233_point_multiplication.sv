// tb_top_k233_point_multiplication: end-to-end test of the pin-level top
// at its default parameters (233-bit field, interleaved multiplier).
// Loads k, xP and yP over the shared input bus, starts the scalar
// multiplication, reads xQ and yQ through the output select and compares
// them with a value worked out off-line (k = 0x52 on the K-233 base
// point) and with the reference Horner model for random digit strings.
// It also counts how often each mechanism of the design happened (load
// of each register, Frobenius step, first digit loading P into Q, point
// addition, output select of both coordinates, point-at-infinity result)
// and counts a failure for any that never did.
module tb_top_k233_point_multiplication;
  import tb_gf_ref_pkg::*;

  logic clk = 0, rst = 1;
  fe_t  in_data, out_data;
  logic k_load = 0, xp_load = 0, yp_load = 0, start = 0, out_sel = 0;
  logic done, q_inf, error;
  int   checks = 0, failures = 0;

  // mechanism counters
  int n_kload = 0, n_xload = 0, n_yload = 0, n_frob = 0, n_first = 0;
  int n_add = 0, n_sel_x = 0, n_sel_y = 0, n_inf = 0;

  top_k233_point_multiplication dut (
    .clk, .rst, .in_data, .k_load, .xp_load, .yp_load, .start, .out_sel,
    .out_data, .done, .q_inf, .error);

  always #5 clk = ~clk;

  // observe the core's schedule: a Frobenius step squares a finite Q,
  // the first 1-digit turns Q from infinity into P, an addition starts
  // the point adder
  logic       core_inf_d = 1'b1;
  fe_t        core_xq_d = '0;
  always @(posedge clk) if (!rst) begin
    if (dut.the_comp.u_add.start) n_add++;
    if (core_inf_d && !dut.the_comp.q_inf) n_first++;
    if (!dut.the_comp.q_inf && !core_inf_d && !dut.the_comp.u_add.busy &&
        dut.the_comp.xq != core_xq_d) n_frob++;
    core_inf_d <= dut.the_comp.q_inf;
    core_xq_d  <= dut.the_comp.xq;
  end

  task automatic load(input fe_t v, input int which);
    @(negedge clk);
    in_data = v;
    k_load  = (which == 0);
    xp_load = (which == 1);
    yp_load = (which == 2);
    @(negedge clk);
    k_load = 0; xp_load = 0; yp_load = 0;
    in_data = rand_fe();   // the bus may change once the load is over
    case (which)
      0: n_kload++;
      1: n_xload++;
      default: n_yload++;
    endcase
  endtask

  task automatic run(input fe_t kk, input fe_t px, input fe_t py,
                     input bit exp_inf, input fe_t ex, input fe_t ey);
    int cyc;
    fe_t gx, gy;
    load(py, 2);
    load(kk, 0);
    load(px, 1);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (done) begin failures++; $display("FAIL done not cleared by start"); end
    cyc = 1;
    while (!done && cyc < 1000000) begin
      @(negedge clk);
      cyc++;
    end
    out_sel = 0; #1 gx = out_data; n_sel_x++;
    out_sel = 1; #1 gy = out_data; n_sel_y++;
    if (q_inf) n_inf++;
    checks++;
    if (!done || error) begin
      failures++;
      $display("FAIL k=%h not done or error", kk);
    end
    checks++;
    if (exp_inf) begin
      if (!q_inf) begin failures++; $display("FAIL expected infinity"); end
    end else if (q_inf || gx !== ex || gy !== ey) begin
      failures++;
      $display("FAIL k=%h Q=(%h,%h) exp (%h,%h)", kk, gx, gy, ex, ey);
    end
    $display("k=%h: %0d cycles from start to done", kk, cyc);
    // done stays high
    @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL done not sticky"); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t ex, ey, kk;
    bit  inf;
    in_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    run(233'h52, GX, GY, 0, K52_X, K52_Y);
    run('0, GX, GY, 1, '0, '0);
    for (int i = 0; i < 2; i++) begin
      kk = 233'($urandom) | (233'($urandom) << 201);
      ref_tau_mul(kk, GX, GY, ex, ey, inf);
      run(kk, GX, GY, inf, ex, ey);
    end

    $display("mechanisms: k loads %0d, xP loads %0d, yP loads %0d, Frobenius %0d, first digit %0d, additions %0d, xQ reads %0d, yQ reads %0d, infinity results %0d",
             n_kload, n_xload, n_yload, n_frob, n_first, n_add, n_sel_x, n_sel_y, n_inf);
    checks++; if (n_kload == 0) failures++;
    checks++; if (n_xload == 0) failures++;
    checks++; if (n_yload == 0) failures++;
    checks++; if (n_frob  == 0) failures++;
    checks++; if (n_first == 0) failures++;
    checks++; if (n_add   == 0) failures++;
    checks++; if (n_sel_x == 0) failures++;
    checks++; if (n_sel_y == 0) failures++;
    checks++; if (n_inf   == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
