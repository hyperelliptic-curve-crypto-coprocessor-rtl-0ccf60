// tb_hecc_group_unit: runs the micro-coded group operations on the group unit and
// a register file, and compares with the straight-line reference formulae:
//   INIT  Q = P
//   DBL   projective doubling of a random projective divisor (random Z)
//   ADD   Q + P for projective Q and affine P: the exact projective result of the
//         straight-line formula, and, made affine, the affine addition formula
//   AFF   conversion to affine form
//   P + P through ADD, which the general formula does not cover: Z' = 0 and
//         `exc` must be set
// Divisors are random with curve constants chosen so that they lie on the curve;
// the results are also checked to lie on the curve. Cycle counts per routine
// are printed.
module tb_hecc_group_unit;
  import tb_hecc_ref_pkg::*;
  import hecc_pkg::*;

  logic clk = 0, rst_n = 1, start = 0, busy, done, exc;
  initial #1 rst_n = 0;  // reset edge before the first clock edge
  gop_e gop;
  ra_t  g_ra0, g_ra1, g_wa, t_wa;
  logic g_we, t_we = 0;
  fe    g_wd, t_wd, rd0, rd1;
  logic [31:0] n_pair, n_mul, n_lin, n_inv;
  int checks = 0, failures = 0;

  hecc_group_unit dut (
    .clk, .rst_n, .start, .gop, .busy, .done, .exc,
    .rf_ra0(g_ra0), .rf_rd0(rd0), .rf_ra1(g_ra1), .rf_rd1(rd1),
    .rf_we(g_we), .rf_wa(g_wa), .rf_wd(g_wd),
    .n_pair, .n_mul, .n_lin, .n_inv
  );

  hecc_regfile u_rf (
    .clk, .ra0(g_ra0), .rd0, .ra1(g_ra1), .rd1,
    .we(t_we || g_we), .wa(t_we ? t_wa : g_wa), .wd(t_we ? t_wd : g_wd)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(ra_t a, fe d);
    @(negedge clk);
    t_we = 1; t_wa = a; t_wd = d;
    @(negedge clk);
    t_we = 0;
  endtask

  function automatic fe rd(ra_t a);
    return u_rf.mem[a];
  endfunction

  task automatic load_q(pdiv_t q);
    wr(R_U1, q.u1); wr(R_U0, q.u0); wr(R_V1, q.v1); wr(R_V0, q.v0); wr(R_Z, q.z);
  endtask

  task automatic load_p(adiv_t p);
    wr(R_PU1, p.u1); wr(R_PU0, p.u0); wr(R_PV1, p.v1); wr(R_PV0, p.v0);
  endtask

  task automatic run(gop_e op, output int cyc);
    @(negedge clk);
    gop = op; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  function automatic pdiv_t read_q();
    pdiv_t q;
    q.u1 = rd(R_U1); q.u0 = rd(R_U0); q.v1 = rd(R_V1); q.v0 = rd(R_V0); q.z = rd(R_Z);
    return q;
  endfunction

  task automatic cmp(string what, pdiv_t got, pdiv_t exp);
    checks++;
    if (got.u1 !== exp.u1 || got.u0 !== exp.u0 || got.v1 !== exp.v1 ||
        got.v0 !== exp.v0 || got.z !== exp.z) begin
      failures++;
      $display("FAIL %s: got %h %h %h %h %h", what, got.u1, got.u0, got.v1, got.v0, got.z);
      $display("          exp %h %h %h %h %h", exp.u1, exp.u0, exp.v1, exp.v0, exp.z);
    end
  endtask

  task automatic oncurve(string what, pdiv_t q, fe f1, fe f0);
    checks++;
    if (!on_curve(to_aff(q), f1, f0)) begin
      failures++;
      $display("FAIL %s: result not on the curve", what);
    end
  endtask

  initial begin
    adiv_t p, a;
    pdiv_t q, e, g;
    fe f1, f0, z;
    int c_dbl, c_add, c_aff, c_init;
    gop = GOP_DBL;
    t_wa = '0; t_wd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      rand_div(p, f1, f0);
      load_p(p);
      // INIT
      run(GOP_INIT, c_init);
      cmp("INIT", read_q(), to_proj(p));
      // DBL of P given with a random Z
      z = rnd();
      q.u1 = gmul(p.u1, z); q.u0 = gmul(p.u0, z); q.v1 = gmul(p.v1, z); q.v0 = gmul(p.v0, z); q.z = z;
      load_q(q);
      run(GOP_DBL, c_dbl);
      e = dbl(q);
      g = read_q();
      cmp("DBL", g, e);
      oncurve("DBL", g, f1, f0);
      // second doubling straight on the result (chained projective input)
      run(GOP_DBL, c_dbl);
      e = dbl(e);
      g = read_q();
      cmp("DBL2", g, e);
      oncurve("DBL2", g, f1, f0);
      // ADD: 4P + P
      run(GOP_ADD, c_add);
      a = add_aff(to_aff(e), p);
      e = add_proj(e, p);
      g = read_q();
      cmp("ADD", g, e);
      cmp("ADD affine", to_proj(to_aff(g)), to_proj(a));
      oncurve("ADD", g, f1, f0);
      // AFF of a doubled (projective) divisor
      run(GOP_DBL, c_dbl);
      e = dbl(e);
      run(GOP_AFF, c_aff);
      a = to_aff(e);
      cmp("AFF", read_q(), to_proj(a));
      checks++;
      if (exc) begin failures++; $display("FAIL exception flag in the general case"); end
      // Q = P is outside the general addition case: the result has Z = 0
      run(GOP_INIT, c_init);
      run(GOP_ADD, c_add);
      checks++;
      if (!exc) begin failures++; $display("FAIL P + P not flagged"); end
    end
    checks++;
    if (n_inv == 0 || n_pair == 0 || n_lin == 0) begin
      failures++;
      $display("FAIL activity counters pair=%0d inv=%0d lin=%0d", n_pair, n_inv, n_lin);
    end
    $display("cycles: INIT %0d DBL %0d ADD %0d AFF %0d; pairs %0d mults %0d lin %0d inv %0d",
             c_init, c_dbl, c_add, c_aff, n_pair, n_mul, n_lin, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
