// tb_gf_inv: checks the MAIA inverter (unrolling level 4): a * y = 1 for edge and
// random operands, agreement with inversion by exponentiation, the zero input,
// and that every inversion ends within 3*89/4 + 2 cycles (each bit of degree costs one
// shift step, and at most every other step is an addition step). It reports the
// average cycle count.
module tb_gf_inv;
  import tb_hecc_ref_pkg::*;
  localparam int UNROLL = 4;
  localparam int MAXCYC = 3 * M / UNROLL + 2;
  logic clk = 0, rst_n = 1, start = 0, busy, done, zero_in;
  initial #1 rst_n = 0;  // reset edge before the first clock edge
  fe a, y;
  int checks = 0, failures = 0;
  longint total = 0;
  int n = 0, worst = 0;

  gf_inv #(.UNROLL(UNROLL)) dut (.clk, .rst_n, .start, .a, .busy, .done, .zero_in, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe x);
    int cyc = 0;
    @(negedge clk);
    a = x; start = 1;
    @(negedge clk);
    start = 0; a = rnd();
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 3;
    if (x == '0) begin
      if (!zero_in || y !== '0) begin
        failures++;
        $display("FAIL zero input");
      end
    end else begin
      if (gmul(x, y) !== fe'(1) || zero_in) begin
        failures++;
        $display("FAIL inv %h -> %h", x, y);
      end
      if (y !== ginv(x)) begin
        failures++;
        $display("FAIL inv %h -> %h exp %h", x, y, ginv(x));
      end
    end
    if (cyc > MAXCYC) begin
      failures++;
      $display("FAIL inv took %0d cycles", cyc);
    end
    if (x != '0) begin
      total += cyc; n++;
      if (cyc > worst) worst = cyc;
    end
  endtask

  initial begin
    a = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('0);
    run(fe'(1));
    run('1);
    run({1'b1, 88'b0});
    run(fe'(2));
    for (int i = 0; i < 200; i++) run(rnd());
    $display("inversion cycles: average %0d, worst %0d", total / n, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
