// gf_inv: field inverter in GF(2^M) after the modified almost inverse algorithm
// (MAIA), with its loop unrolled UNROLL times.
//
// State: u, v (u starts as the input, v as the reduction polynomial f) and the
// cofactors b, c (b = 1, c = 0), with the invariants b*a = u and c*a = v mod f.
// One primitive step is:
//   u even       : u = u/x,  b = b/x mod f  (b + f first when b is odd)
//   u odd, u != 1: if deg(u) < deg(v) swap (u,b) with (v,c); u = u + v, b = b + c
// and the inversion ends when u = 1, leaving b = a^-1. Because b is divided by x
// together with u, no correction by x^-k is needed at the end (the difference
// from the plain almost inverse algorithm). UNROLL primitive steps are chained
// combinationally in each clock cycle; the coprocessor uses UNROLL = 4. The degree
// comparison is done without a priority encoder: deg(u) < deg(v) exactly when
// u < v and u < (u xor v).
//
// Interface: a one-cycle `start` loads `a`; `done` pulses for one cycle when `y`
// holds the inverse, which it keeps until the next start. An input of zero has no
// inverse: the unit then finishes one cycle after the start with y = 0 and
// `zero_in` set. The cycle count depends on the operand (about 2M/UNROLL steps'
// worth of cycles plus one).
module gf_inv #(
  parameter int unsigned M      = hecc_pkg::M,
  parameter int unsigned K      = hecc_pkg::K,
  parameter int unsigned UNROLL = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic         zero_in,
  output logic [M-1:0] y
);
  localparam logic [M:0] F = (M+1)'(1) << M | (M+1)'(1) << K | (M+1)'(1);

  typedef struct packed {
    logic [M:0]   u;
    logic [M:0]   v;
    logic [M-1:0] b;
    logic [M-1:0] c;
  } st_t;

  st_t st, st_nx;

  function automatic st_t step(input st_t s);
    st_t r;
    logic [M:0] bf;
    r = s;
    if (s.u == (M+1)'(1)) begin
      r = s;
    end else if (!s.u[0]) begin
      r.u = s.u >> 1;
      bf  = ({1'b0, s.b} ^ (s.b[0] ? F : '0)) >> 1;
      r.b = bf[M-1:0];
    end else begin
      if ((s.u < s.v) && (s.u < (s.u ^ s.v))) begin
        r.u = s.v ^ s.u;
        r.b = s.c ^ s.b;
        r.v = s.u;
        r.c = s.b;
      end else begin
        r.u = s.u ^ s.v;
        r.b = s.b ^ s.c;
      end
    end
    return r;
  endfunction

  always_comb begin
    st_nx = st;
    for (int i = 0; i < int'(UNROLL); i++) st_nx = step(st_nx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      zero_in <= 1'b0;
      y       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        zero_in <= (a == '0);
        if (a == '0) begin
          y    <= '0;
          done <= 1'b1;
        end else begin
          st   <= '{u: {1'b0, a}, v: F, b: M'(1), c: '0};
          busy <= 1'b1;
        end
      end else if (busy) begin
        st <= st_nx;
        if (st_nx.u == (M+1)'(1)) begin
          y    <= st_nx.b;
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
