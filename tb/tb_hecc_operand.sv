// tb_hecc_operand: checks the operand path y = x0^(2^pw0) + x1^(2^pw1) for all
// power combinations against the reference field model.
module tb_hecc_operand;
  import tb_hecc_ref_pkg::*;
  fe x0, x1, y;
  logic [1:0] pw0, pw1;
  int checks = 0, failures = 0;

  hecc_operand dut (.x0, .pw0, .x1, .pw1, .y);

  function automatic fe pw(fe v, logic [1:0] p);
    if (p == 2'd0) return v;
    if (p == 2'd1) return gsq(v);
    return gsq(gsq(v));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      x0 = rnd(); x1 = (i % 7 == 0) ? '0 : rnd();
      pw0 = 2'(i % 3); pw1 = 2'((i / 3) % 3);
      #1;
      checks++;
      if (y !== (pw(x0, pw0) ^ pw(x1, pw1))) begin
        failures++;
        $display("FAIL operand pw0=%0d pw1=%0d", pw0, pw1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
