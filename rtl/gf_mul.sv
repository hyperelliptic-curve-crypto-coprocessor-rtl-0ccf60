// gf_mul: least-significant-digit-first digit-serial multiplier in GF(2^M).
//
// With d = ceil(M/D) digits B_i of D bits, C = A * sum B_i x^(D*i) mod p(x) is
// accumulated one digit per clock: C += A_i * B_i (reduced) and A_(i+1) = A_i * x^D
// (reduced), so D partial products are formed in parallel and a multiplication
// takes d cycles (6 for M = 89, D = 16, the digit size the coprocessor uses),
// the first of them being the start cycle.
//
// Interface: a one-cycle `start` loads `a` and `b`. `busy` is high while the
// digits are processed and `done` pulses for one cycle d cycles after the start
// cycle (the start cycle counts as the first); `p` then holds A*B and keeps it until the next start. A start while busy
// is ignored.
module gf_mul #(
  parameter int unsigned M = hecc_pkg::M,
  parameter int unsigned K = hecc_pkg::K,
  parameter int unsigned D = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] p
);
  localparam int unsigned ND   = (M + D - 1) / D;
  localparam int unsigned CW   = $clog2(ND + 1);
  localparam int unsigned BW   = ND * D;

  logic [M-1:0]  areg, acc;
  logic [BW-1:0] breg;
  logic [CW-1:0] cnt;
  logic [M-1:0]  acc_nx, a_nx;

  // Reduce an (M+D)-bit polynomial modulo x^M + x^K + 1.
  function automatic logic [M-1:0] reduce(input logic [M+D-1:0] v);
    logic [M+D-1:0] w;
    w = v;
    for (int i = int'(M + D) - 1; i >= int'(M); i--) begin
      if (w[i]) begin
        w[i]                     = 1'b0;
        w[i - int'(M) + int'(K)] = ~w[i - int'(M) + int'(K)];
        w[i - int'(M)]           = ~w[i - int'(M)];
      end
    end
    return w[M-1:0];
  endfunction

  // The first digit is processed in the start cycle itself, straight from the
  // inputs, so the product is complete after d clock edges.
  always_comb begin
    logic [M+D-1:0] pp;
    logic [M-1:0]   a_src, acc_src;
    logic [D-1:0]   dig;
    a_src   = (start && !busy) ? a : areg;
    acc_src = (start && !busy) ? '0 : acc;
    dig     = (start && !busy) ? b[D-1:0] : breg[D-1:0];
    pp = '0;
    for (int j = 0; j < int'(D); j++)
      if (dig[j]) pp ^= (M+D)'(a_src) << j;
    acc_nx = acc_src ^ reduce(pp);
    a_nx   = reduce((M+D)'(a_src) << D);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      areg <= '0;
      breg <= '0;
      acc  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        areg <= a_nx;
        breg <= BW'(b) >> D;
        acc  <= acc_nx;
        cnt  <= CW'(ND - 1);
        busy <= (ND > 1);
        done <= (ND == 1);
      end else if (busy) begin
        acc  <= acc_nx;
        areg <= a_nx;
        breg <= breg >> D;
        cnt  <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign p = acc;
endmodule
