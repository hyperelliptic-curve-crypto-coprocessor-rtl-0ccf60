// tb_hecc_regfile: writes every stored entry with random data and reads it back
// on both ports, checks the constant addresses 0 and 1 (also after an attempted
// write is skipped) and that a write lands only in its own entry.
module tb_hecc_regfile;
  import tb_hecc_ref_pkg::*;
  localparam int N = 25;
  logic clk = 0, we = 0;
  logic [4:0] ra0, ra1, wa;
  fe rd0, rd1, wd;
  fe model [N];
  int checks = 0, failures = 0;

  hecc_regfile dut (.clk, .ra0, .rd0, .ra1, .rd1, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, fe d);
    @(negedge clk);
    we = 1; wa = 5'(a); wd = d;
    @(negedge clk);
    we = 0;
    model[a] = d;
  endtask

  task automatic chk(int a0, int a1);
    fe e0, e1;
    ra0 = 5'(a0); ra1 = 5'(a1);
    #1;
    e0 = (a0 == 0) ? '0 : (a0 == 1) ? fe'(1) : model[a0];
    e1 = (a1 == 0) ? '0 : (a1 == 1) ? fe'(1) : model[a1];
    checks += 2;
    if (rd0 !== e0) begin failures++; $display("FAIL rd0 @%0d", a0); end
    if (rd1 !== e1) begin failures++; $display("FAIL rd1 @%0d", a1); end
  endtask

  initial begin
    ra0 = 0; ra1 = 0; wa = 0; wd = '0;
    for (int i = 2; i < N; i++) wr(i, rnd());
    for (int i = 0; i < N; i++) chk(i, N - 1 - i);
    for (int r = 0; r < 100; r++) begin
      int a = 2 + int'($urandom % (N - 2));
      wr(a, rnd());
      for (int i = 0; i < N; i++) chk(i, (i * 7) % N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
