// hecc_pkg: shared constants and types of the genus-2 HECC coprocessor.
//
// The field is GF(2^89) reduced by the trinomial x^89 + x^38 + 1, the curve is
// y^2 + x*y = x^5 + f1*x + f0, and a divisor is held in projective Mumford form
// [U1, U0, V1, V0, Z]. Field size, trinomial, digit size 16 and unrolling level 4
// are the values the coprocessor is built with; the micro-instruction format,
// the register map and the routine entry points are this design's own.
package hecc_pkg;

  // Field GF(2^M) with reduction polynomial x^M + x^K + 1.
  localparam int unsigned M = 89;
  localparam int unsigned K = 38;
  typedef logic [M-1:0] fe_t;

  // Register file: 25 entries; addresses 0 and 1 read as the constants 0 and 1.
  localparam int unsigned RF_ENTRIES = 25;
  localparam int unsigned RA_W = 5;
  typedef logic [RA_W-1:0] ra_t;

  // Register map (register allocation of the group-operation micro-code).
  localparam ra_t R_ZERO = 5'd0;
  localparam ra_t R_ONE  = 5'd1;
  localparam ra_t R_U1   = 5'd2;   // running divisor Q = [U1, U0, V1, V0, Z]
  localparam ra_t R_U0   = 5'd3;
  localparam ra_t R_V1   = 5'd4;
  localparam ra_t R_V0   = 5'd5;
  localparam ra_t R_Z    = 5'd6;
  localparam ra_t R_PU1  = 5'd7;   // base divisor P (affine)
  localparam ra_t R_PU0  = 5'd8;
  localparam ra_t R_PV1  = 5'd9;
  localparam ra_t R_PV0  = 5'd10;
  localparam ra_t R_T0   = 5'd11;  // temporaries T0..T10
  localparam ra_t R_T1   = 5'd12;
  localparam ra_t R_T2   = 5'd13;
  localparam ra_t R_T3   = 5'd14;
  localparam ra_t R_T4   = 5'd15;
  localparam ra_t R_T5   = 5'd16;
  localparam ra_t R_T6   = 5'd17;
  localparam ra_t R_T7   = 5'd18;
  localparam ra_t R_T8   = 5'd19;
  localparam ra_t R_T9   = 5'd20;
  localparam ra_t R_T10  = 5'd21;

  // Operand source: a register raised to 2^pw (pw = 0: as is, 1: squared,
  // 2: fourth power). An operand is the sum of two sources.
  typedef struct packed {
    ra_t        ra;
    logic [1:0] pw;
  } src_t;

  typedef struct packed {
    src_t s0;
    src_t s1;
  } opnd_t;

  // Micro-operations.
  //   UOP_MUL : dst = A * B + R[c]        (field multiplier)
  //   UOP_LIN : dst = A + R[c]            (additions and squarings only)
  //   UOP_INV : dst = A^-1                (field inverter)
  //   UOP_END : end of a routine
  typedef enum logic [1:0] {UOP_MUL, UOP_LIN, UOP_INV, UOP_END} uop_e;

  // par = 1 on a UOP_MUL: the next instruction (also a UOP_MUL) runs on the
  // second multiplier at the same time. Both read their operands before either
  // writes; the second may name the first one's destination as its c.
  typedef struct packed {
    uop_e  op;
    logic  par;
    opnd_t a;
    opnd_t b;
    ra_t   c;
    ra_t   dst;
  } uinst_t;

  localparam int unsigned UPC_W = 7;
  typedef logic [UPC_W-1:0] upc_t;

  // Micro-code routine entry points.
  localparam upc_t UPC_DBL  = 7'd0;
  localparam upc_t UPC_ADD  = 7'd40;
  localparam upc_t UPC_AFF  = 7'd88;
  localparam upc_t UPC_INIT = 7'd96;

  // Group operations the main controller can request.
  typedef enum logic [1:0] {GOP_DBL, GOP_ADD, GOP_AFF, GOP_INIT} gop_e;

endpackage
