// tb_hecc_coproc_full: one complete scalar multiplication with the coprocessor
// at its default size (178-bit scalar, GF(2^89), digit size 16, unrolling 4).
// A random 178-bit scalar with its top bit set multiplies a random divisor; the
// result is compared with the reference model and checked to lie on the curve,
// and the cycle count, doublings and additions are printed.
module tb_hecc_coproc_full;
  import tb_hecc_ref_pkg::*;
  localparam int SB = 178;

  logic clk = 0, rst_n = 1, start = 0, busy, done, r_zero, r_exc;
  initial #1 rst_n = 0;  // reset edge before the first clock edge
  logic [SB-1:0] k;
  fe p_in [4];
  fe r_out [4];
  logic [15:0] stat_dbl, stat_add, stat_skip;
  logic [31:0] stat_pair, stat_mul, stat_lin, stat_inv;
  int checks = 0, failures = 0;

  hecc_coproc dut (
    .clk, .rst_n, .start, .k, .p_in, .busy, .done, .r_out, .r_zero, .r_exc,
    .stat_dbl, .stat_add, .stat_skip, .stat_pair, .stat_mul, .stat_lin, .stat_inv
  );

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adiv_t p, e, g;
    fe f1, f0;
    int cyc = 0;
    rand_div(p, f1, f0);
    p_in[0] = p.u1; p_in[1] = p.u0; p_in[2] = p.v1; p_in[3] = p.v0;
    k = SB'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    k[SB-1] = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    g.u1 = r_out[0]; g.u0 = r_out[1]; g.v1 = r_out[2]; g.v0 = r_out[3];
    e = kmul(256'(k), SB, p);
    checks += 3;
    if (g != e || r_exc) begin
      failures++;
      $display("FAIL got %h %h %h %h", g.u1, g.u0, g.v1, g.v0);
      $display("     exp %h %h %h %h", e.u1, e.u0, e.v1, e.v0);
    end
    if (!on_curve(g, f1, f0)) begin
      failures++;
      $display("FAIL result not on the curve");
    end
    if (int'(stat_dbl) != SB - 1) begin
      failures++;
      $display("FAIL %0d doublings, expected %0d", stat_dbl, SB - 1);
    end
    $display("k*P with %0d-bit k: %0d cycles, %0d doublings, %0d additions, %0d inversions",
             SB, cyc, stat_dbl, stat_add, stat_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
