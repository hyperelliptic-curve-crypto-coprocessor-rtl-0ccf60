// hecc_operand: the operand path between the register file and the field units.
//
// Field additions and squarings are done while an operand moves from the register
// file to a multiplier or the inverter, so they take no cycle of their own. The
// operand is the sum of two register values, each of them taken as is, squared,
// or raised to the fourth power (pw = 0, 1, 2; pw = 3 is treated as 2). The
// squarings are two cascaded gf_sqr stages per source. Purely combinational.
module hecc_operand #(
  parameter int unsigned M = hecc_pkg::M,
  parameter int unsigned K = hecc_pkg::K
) (
  input  logic [M-1:0] x0,
  input  logic [1:0]   pw0,
  input  logic [M-1:0] x1,
  input  logic [1:0]   pw1,
  output logic [M-1:0] y
);
  logic [M-1:0] x0_2, x0_4, x1_2, x1_4;
  logic [M-1:0] t0, t1;

  gf_sqr #(.M(M), .K(K)) u_sq0a (.a(x0),   .y(x0_2));
  gf_sqr #(.M(M), .K(K)) u_sq0b (.a(x0_2), .y(x0_4));
  gf_sqr #(.M(M), .K(K)) u_sq1a (.a(x1),   .y(x1_2));
  gf_sqr #(.M(M), .K(K)) u_sq1b (.a(x1_2), .y(x1_4));

  always_comb begin
    unique case (pw0)
      2'd0:    t0 = x0;
      2'd1:    t0 = x0_2;
      default: t0 = x0_4;
    endcase
    unique case (pw1)
      2'd0:    t1 = x1;
      2'd1:    t1 = x1_2;
      default: t1 = x1_4;
    endcase
    y = t0 ^ t1;
  end
endmodule
