// tb_hecc_coproc: end-to-end test of the coprocessor with a 24-bit scalar.
// For random divisors (on curves chosen to fit them) and random scalars it
// compares k*P with the reference left-to-right binary scalar multiplication,
// and checks that the result lies on the curve. It also runs k = 0 (neutral
// element), k = 1 and a scalar with leading zeros, and counts how often each
// mechanism occurred: doublings, additions, skipped leading zeros, paired
// multiplications on the two multipliers, add/square-only operations on the
// operand path, inversions, the neutral-element case and an exceptional input
// (u0 = 0) that the general formulae do not cover and that must raise r_exc. A mechanism that never
// occurred counts as a failure. Prints cycles per scalar multiplication.
module tb_hecc_coproc;
  import tb_hecc_ref_pkg::*;
  localparam int SB = 24;

  logic clk = 0, rst_n = 1, start = 0, busy, done, r_zero, r_exc;
  initial #1 rst_n = 0;  // reset edge before the first clock edge
  logic [SB-1:0] k;
  fe p_in [4];
  fe r_out [4];
  logic [15:0] stat_dbl, stat_add, stat_skip;
  logic [31:0] stat_pair, stat_mul, stat_lin, stat_inv;
  int checks = 0, failures = 0;
  int m_dbl = 0, m_add = 0, m_skip = 0, m_zero = 0, m_exc = 0;

  hecc_coproc #(.SCALAR_BITS(SB)) dut (
    .clk, .rst_n, .start, .k, .p_in, .busy, .done, .r_out, .r_zero, .r_exc,
    .stat_dbl, .stat_add, .stat_skip, .stat_pair, .stat_mul, .stat_lin, .stat_inv
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [SB-1:0] kv, bit special = 0);
    adiv_t p, e, g;
    fe f1, f0;
    int cyc = 0;
    rand_div(p, f1, f0);
    if (special) begin
      // u0 = 0: the doubling writes Z = 0, which the group unit flags
      p.u0 = '0;
      curve_rem(p, '0, '0, f1, f0);
    end
    p_in[0] = p.u1; p_in[1] = p.u0; p_in[2] = p.v1; p_in[3] = p.v0;
    @(negedge clk);
    k = kv; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    m_dbl += stat_dbl; m_add += stat_add; m_skip += stat_skip;
    checks++;
    if (special) begin
      m_exc++;
      if (!r_exc) begin failures++; $display("FAIL exceptional case not flagged"); end
      return;
    end
    if (kv == '0) begin
      m_zero++;
      if (!r_zero) begin failures++; $display("FAIL k=0 not neutral"); end
      return;
    end
    g.u1 = r_out[0]; g.u0 = r_out[1]; g.v1 = r_out[2]; g.v0 = r_out[3];
    e = kmul(256'(kv), SB, p);
    if (g != e || r_zero || r_exc) begin
      failures++;
      $display("FAIL k=%h: got %h %h %h %h", kv, g.u1, g.u0, g.v1, g.v0);
      $display("            exp %h %h %h %h", e.u1, e.u0, e.v1, e.v0);
    end
    checks++;
    if (!on_curve(g, f1, f0)) begin
      failures++;
      $display("FAIL k=%h: result not on the curve", kv);
    end
    $display("k=%h: %0d cycles, %0d doublings, %0d additions", kv, cyc, stat_dbl, stat_add);
  endtask

  initial begin
    k = '0;
    for (int i = 0; i < 4; i++) p_in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('0);
    run(SB'(1));
    run(SB'(5));
    run(SB'(24'h00_3a_c5));
    run(SB'(5), 1);
    for (int t = 0; t < 4; t++) run(SB'($urandom) | {1'b1, {(SB-1){1'b0}}});
    checks += 8;
    if (m_exc == 0)     begin failures++; $display("FAIL no exceptional case"); end
    if (m_dbl == 0)     begin failures++; $display("FAIL no doubling");   end
    if (m_add == 0)     begin failures++; $display("FAIL no addition");   end
    if (m_skip == 0)    begin failures++; $display("FAIL no leading-zero skip"); end
    if (m_zero == 0)    begin failures++; $display("FAIL no neutral element"); end
    if (stat_pair == 0) begin failures++; $display("FAIL no paired multiplication"); end
    if (stat_lin == 0)  begin failures++; $display("FAIL no operand-path add/square"); end
    if (stat_inv == 0)  begin failures++; $display("FAIL no inversion"); end
    $display("mechanisms: dbl %0d add %0d skip %0d zero %0d exc %0d pair %0d mul %0d lin %0d inv %0d",
             m_dbl, m_add, m_skip, m_zero, m_exc, stat_pair, stat_mul, stat_lin, stat_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
