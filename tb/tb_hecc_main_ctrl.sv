// tb_hecc_main_ctrl: checks the scalar-multiplication sequencing of the main
// control unit against the bits of k. A stand-in for the group unit records
// every requested operation and answers `done` a few cycles later; a stand-in
// register file records the loaded base divisor and supplies a marker result.
// The stand-in can report an exception on the third operation, which must show
// on r_exc for that run only. Expected sequence: INIT for the leading one, then per following bit DBL and,
// for a one, ADD, and finally AFF. Also checks k = 0, k = 1 and the counters.
module tb_hecc_main_ctrl;
  import hecc_pkg::*;
  import tb_hecc_ref_pkg::*;
  localparam int SB = 178;

  logic clk = 0, rst_n = 1, start = 0, busy, done, r_zero, r_exc;
  initial #1 rst_n = 0;  // reset edge before the first clock edge
  logic [SB-1:0] k;
  fe p_in [4];
  fe r_out [4];
  logic g_start, g_done = 0, g_exc = 0;
  gop_e g_op;
  logic rf_own, rf_we;
  ra_t  rf_ra, rf_wa;
  fe    rf_rd, rf_wd;
  logic [15:0] n_dbl, n_add, n_skip;
  fe    mem [32];
  gop_e ops [$];
  int checks = 0, failures = 0;
  bit exc_on = 0;

  hecc_main_ctrl #(.SCALAR_BITS(SB)) dut (
    .clk, .rst_n, .start, .k, .p_in, .busy, .done, .r_out, .r_zero, .r_exc,
    .g_start, .g_op, .g_done, .g_exc,
    .rf_own, .rf_ra, .rf_rd, .rf_we, .rf_wa, .rf_wd,
    .n_dbl, .n_add, .n_skip
  );

  always #5 clk = ~clk;

  // group-unit stand-in: done three cycles after a start
  int gcnt = 0;
  always @(posedge clk) begin
    g_done <= 1'b0;
    if (g_start && gcnt == 0) begin
      ops.push_back(g_op);
      gcnt <= 3;
    end else if (gcnt > 0) begin
      gcnt <= gcnt - 1;
      if (gcnt == 1) begin
        g_done <= 1'b1;
        g_exc  <= exc_on && (ops.size() == 3);
      end
    end
    if (rf_we) mem[rf_wa] <= rf_wd;
  end
  assign rf_rd = mem[rf_ra];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [SB-1:0] kv);
    gop_e exp [$];
    int top = -1, nd = 0, na = 0;
    for (int i = 0; i < 4; i++) p_in[i] = rnd();
    for (int i = 0; i < 32; i++) mem[i] = rnd();
    ops.delete();
    @(negedge clk);
    k = kv; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int i = SB - 1; i >= 0; i--) if (kv[i] && top < 0) top = i;
    checks++;
    if (top < 0) begin
      if (!r_zero || ops.size() != 0) begin
        failures++;
        $display("FAIL k=0");
      end
      return;
    end
    exp.push_back(GOP_INIT);
    for (int i = top - 1; i >= 0; i--) begin
      exp.push_back(GOP_DBL); nd++;
      if (kv[i]) begin exp.push_back(GOP_ADD); na++; end
    end
    exp.push_back(GOP_AFF);
    if (ops != exp) begin
      failures++;
      $display("FAIL op sequence: %0d ops, expected %0d", ops.size(), exp.size());
    end
    checks += 4;
    if (mem[R_PU1] !== p_in[0] || mem[R_PU0] !== p_in[1] ||
        mem[R_PV1] !== p_in[2] || mem[R_PV0] !== p_in[3]) begin
      failures++; $display("FAIL base divisor not loaded");
    end
    if (r_out[0] !== mem[R_U1] || r_out[1] !== mem[R_U0] ||
        r_out[2] !== mem[R_V1] || r_out[3] !== mem[R_V0] || r_zero) begin
      failures++; $display("FAIL result not unloaded");
    end
    if (int'(n_dbl) != nd || int'(n_add) != na) begin
      failures++; $display("FAIL counters dbl %0d/%0d add %0d/%0d", n_dbl, nd, n_add, na);
    end
    if (r_exc != (exc_on && exp.size() >= 3)) begin
      failures++; $display("FAIL exception flag %0d", r_exc);
    end
    if (int'(n_skip) != SB - 1 - top) begin
      failures++; $display("FAIL skip %0d exp %0d", n_skip, SB - 1 - top);
    end
  endtask

  initial begin
    k = '0;
    for (int i = 0; i < 4; i++) p_in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run('0);
    run(SB'(1));
    run(SB'(2));
    run(SB'(13));
    run({1'b1, {(SB-1){1'b0}}});
    run('1);
    for (int t = 0; t < 10; t++) begin
      logic [255:0] r = {8{$urandom}};
      run(SB'(r) >> ($urandom % SB));
    end
    exc_on = 1;
    run(SB'(13));
    exc_on = 0;
    run(SB'(13));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
