// hecc_coproc: genus-2 hyperelliptic-curve scalar-multiplication coprocessor
// over GF(2^89), projective coordinates, shared arithmetic (one group-operation
// unit with two multipliers and one inverter), register file in a memory.
//
// Given a divisor P = [u1, u0, v1, v0] (affine Mumford form, u = x^2 + u1 x + u0,
// v = v1 x + v0) of the Jacobian of y^2 + x*y = x^5 + f1*x + f0 and a scalar k,
// it returns k*P in affine form. Blocks: the main control unit
// (hecc_main_ctrl, binary left-to-right method), the group-operation unit
// (hecc_group_unit: micro-coded doubling and addition on digit-serial
// multipliers with digit size D and a MAIA inverter with unrolling level
// UNROLL) and the register file (hecc_regfile, 25 words). The register file
// is shared: the main control unit owns its ports while it loads P and
// unloads the result, the group-operation unit the rest of the time.
//
// Interface: hold p_in and k stable and pulse `start` while `busy` is low.
// `done` pulses for one cycle when r_out holds k*P; `r_zero` marks the neutral
// element (k = 0); `r_exc` marks a run that met a case outside the general
// formulae (r_out is then invalid). The stat_* outputs count doublings, additions and skipped
// leading zeros of the last run, and issued multiplier pairs, multiplications,
// linear operations and inversions since reset. The cycle count depends on k: about 4 + bits + one INIT,
// plus per doubling and per addition the micro-code time of those routines
// (about 162 and 218 cycles at the default D and UNROLL).
module hecc_coproc
  import hecc_pkg::*;
#(
  parameter int unsigned SCALAR_BITS = 178,
  parameter int unsigned D           = 16,
  parameter int unsigned UNROLL      = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [SCALAR_BITS-1:0] k,
  input  fe_t                    p_in [4],
  output logic                   busy,
  output logic                   done,
  output fe_t                    r_out [4],
  output logic                   r_zero,
  output logic                   r_exc,
  // statistics of the last run (group operations) and since reset (micro-ops)
  output logic [15:0]            stat_dbl,
  output logic [15:0]            stat_add,
  output logic [15:0]            stat_skip,
  output logic [31:0]            stat_pair,
  output logic [31:0]            stat_mul,
  output logic [31:0]            stat_lin,
  output logic [31:0]            stat_inv
);
  logic  g_start, g_done, g_busy, g_exc;
  gop_e  g_op;
  logic  c_own, c_we;
  ra_t   c_ra, c_wa;
  fe_t   c_wd;
  ra_t   g_ra0, g_ra1, g_wa;
  logic  g_we;
  fe_t   g_wd;
  ra_t   ra0, ra1, wa;
  logic  we;
  fe_t   wd, rd0, rd1;

  hecc_main_ctrl #(.SCALAR_BITS(SCALAR_BITS)) u_ctrl (
    .clk, .rst_n, .start, .k, .p_in, .busy, .done, .r_out, .r_zero, .r_exc,
    .g_start, .g_op, .g_done, .g_exc,
    .rf_own(c_own), .rf_ra(c_ra), .rf_rd(rd0), .rf_we(c_we), .rf_wa(c_wa), .rf_wd(c_wd),
    .n_dbl(stat_dbl), .n_add(stat_add), .n_skip(stat_skip)
  );

  hecc_group_unit #(.D(D), .UNROLL(UNROLL)) u_group (
    .clk, .rst_n, .start(g_start), .gop(g_op), .busy(g_busy), .done(g_done), .exc(g_exc),
    .rf_ra0(g_ra0), .rf_rd0(rd0), .rf_ra1(g_ra1), .rf_rd1(rd1),
    .rf_we(g_we), .rf_wa(g_wa), .rf_wd(g_wd),
    .n_pair(stat_pair), .n_mul(stat_mul), .n_lin(stat_lin), .n_inv(stat_inv)
  );

  // Register-file port ownership.
  always_comb begin
    if (c_own) begin
      ra0 = c_ra;  ra1 = R_ZERO;
      we  = c_we;  wa  = c_wa;  wd = c_wd;
    end else begin
      ra0 = g_ra0; ra1 = g_ra1;
      we  = g_we;  wa  = g_wa;  wd = g_wd;
    end
  end

  hecc_regfile u_rf (
    .clk, .ra0, .rd0, .ra1, .rd1, .we, .wa, .wd
  );

  a_own: assert property (@(posedge clk) disable iff (!rst_n) !(c_own && g_busy));
endmodule
