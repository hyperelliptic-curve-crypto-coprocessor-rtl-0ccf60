// tb_gf_mul: checks the digit-serial multiplier (digit size 16, 6 digits) against
// a shift-and-add model, and that `done` comes exactly ceil(89/16) = 6 cycles
// after the start cycle.
module tb_gf_mul;
  import tb_hecc_ref_pkg::*;
  localparam int D  = 16;
  localparam int ND = (M + D - 1) / D;
  logic clk = 0, rst_n = 1, start = 0, busy, done;
  initial #1 rst_n = 0;  // reset edge before the first clock edge
  fe a, b, p;
  int checks = 0, failures = 0;

  gf_mul #(.D(D)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe x, fe z);
    int cyc = 0;
    @(negedge clk);
    a = x; b = z; start = 1;
    @(negedge clk);
    start = 0;
    a = rnd(); b = rnd();           // operands are latched at start
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (p !== gmul(x, z)) begin
      failures++;
      $display("FAIL mul %h * %h = %h exp %h", x, z, p, gmul(x, z));
    end
    if (cyc != ND) begin
      failures++;
      $display("FAIL latency %0d exp %0d", cyc, ND);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('0, rnd());
    run(fe'(1), fe'(1));
    run('1, '1);
    run({1'b1, 88'b0}, {1'b1, 88'b0});
    for (int i = 0; i < 200; i++) run(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
