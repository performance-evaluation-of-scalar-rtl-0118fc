// tb_classic_squarer: compares the combinational squarer with a reference
// product a*a for edge values and 300 random elements.
module tb_classic_squarer;
  import tb_gf_ref_pkg::*;

  fe_t a, sq;
  int  checks = 0, failures = 0;

  classic_squarer dut (.a(a), .sq(sq));

  task automatic check_one(input fe_t v);
    fe_t exp;
    a = v;
    #1;
    exp = ref_sq(v);
    checks++;
    if (sq !== exp) begin
      failures++;
      $display("FAIL a=%h got %h exp %h", v, sq, exp);
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
    check_one('0);
    check_one(233'(1));
    check_one('1);
    check_one(233'(1) << 232);
    check_one(233'(1) << 116);
    check_one(233'(1) << 117);
    check_one(GX);
    check_one(GY);
    for (int i = 0; i < 300; i++) check_one(rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
