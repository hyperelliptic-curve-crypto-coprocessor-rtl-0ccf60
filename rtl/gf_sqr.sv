// gf_sqr: combinational squarer in GF(2^M), reduction polynomial x^M + x^K + 1.
//
// Squaring in characteristic two is linear: a(x)^2 = sum a_i x^(2i). The bits are
// spread to the even positions of a (2M-1)-bit word, then the upper half is folded
// back with x^M = x^K + 1, starting from the top bit so that bits produced by a
// fold are folded again when they still lie at or above x^M. The result is pure
// wiring and XOR gates: the coprocessor uses it on the operand path so squarings
// cost no clock cycle. Default field: GF(2^89), x^89 + x^38 + 1.
module gf_sqr #(
  parameter int unsigned M = hecc_pkg::M,
  parameter int unsigned K = hecc_pkg::K
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);
  logic [2*M-2:0] w;

  always_comb begin
    w = '0;
    for (int i = 0; i < int'(M); i++) w[2*i] = a[i];
    for (int i = 2*int'(M) - 2; i >= int'(M); i--) begin
      if (w[i]) begin
        w[i]           = 1'b0;
        w[i - int'(M) + int'(K)] = ~w[i - int'(M) + int'(K)];
        w[i - int'(M)]           = ~w[i - int'(M)];
      end
    end
    y = w[M-1:0];
  end
endmodule
