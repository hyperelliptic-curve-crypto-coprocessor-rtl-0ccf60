// tb_gf_sqr: checks gf_sqr against shift-and-add multiplication a*a for edge
// values and random operands in GF(2^89).
module tb_gf_sqr;
  import tb_hecc_ref_pkg::*;
  fe a, y;
  int checks = 0, failures = 0;

  gf_sqr dut (.a(a), .y(y));

  task automatic check_one(fe v);
    a = v;
    #1;
    checks++;
    if (y !== gsq(v)) begin
      failures++;
      $display("FAIL sqr a=%h y=%h exp=%h", v, y, gsq(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0);
    check_one(fe'(1));
    check_one({1'b1, 88'b0});
    check_one('1);
    for (int i = 0; i < M; i++) check_one(fe'(1) << i);
    for (int i = 0; i < 300; i++) check_one(rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
