// hecc_ucode_rom: micro-code of the group operations, read combinationally.
//
// Four routines act on the running divisor Q = [U1, U0, V1, V0, Z] and the
// affine base divisor P = [PU1, PU0, PV1, PV0] held in the register file, for
// the curve y^2 + x*y = x^5 + f1*x + f0 (the curve constants are not needed by
// these formulae):
//   DBL  (UPC_DBL)  Q = 2Q, the inversion-free projective doubling: 31
//        multiplications and 7 squarings, the squarings done on the operand path.
//        The 31 multiplications are issued as 15 pairs on the two multipliers
//        plus one single one.
//   ADD  (UPC_ADD)  Q = Q + P, inversion-free, for projective Q and affine P:
//        43 multiplications (21 pairs plus one single) and 4 squarings on the
//        operand path. With T = Z^4 s1' and q = Z^4 r, where s1'
//        and the resultant r are those of the affine formula, the result is
//        [N1 T^2 q, N0 T q, V1', V0', T^4 q] with polynomial N1, N0, V1', V0'.
//   AFF  (UPC_AFF)  Q to affine form: 1 inversion, 4 multiplications, Z = 1.
//   INIT (UPC_INIT) Q = P with Z = 1.
// All are for the general case: weight-two divisors, gcd(u1, u2) = 1 for the
// addition and u0 != 0 for the doubling. The doubling follows the projective
// formula of the coprocessor; the addition is this design's own mixed
// projective/affine homogenisation of the affine addition formula (43M + 4S
// where the coprocessor's general projective addition needs 45M + 4S). Register allocation (T0..T10) was done by hand from
// the live ranges of the formulae.
module hecc_ucode_rom
  import hecc_pkg::*;
(
  input  upc_t   pc,
  output uinst_t ir
);
  function automatic opnd_t o1(ra_t r, logic [1:0] pw = 2'd0);
    return '{s0: '{ra: r, pw: pw}, s1: '{ra: R_ZERO, pw: 2'd0}};
  endfunction
  function automatic opnd_t o2(ra_t r0, ra_t r1, logic [1:0] pw0 = 2'd0, logic [1:0] pw1 = 2'd0);
    return '{s0: '{ra: r0, pw: pw0}, s1: '{ra: r1, pw: pw1}};
  endfunction
  function automatic uinst_t mul(ra_t dst, opnd_t a, opnd_t b, ra_t c = R_ZERO, logic par = 1'b0);
    return '{op: UOP_MUL, par: par, a: a, b: b, c: c, dst: dst};
  endfunction
  // First instruction of a pair.
  function automatic uinst_t mulp(ra_t dst, opnd_t a, opnd_t b, ra_t c = R_ZERO);
    return mul(dst, a, b, c, 1'b1);
  endfunction
  function automatic uinst_t lin(ra_t dst, opnd_t a, ra_t c = R_ZERO);
    return '{op: UOP_LIN, par: 1'b0, a: a, b: '0, c: c, dst: dst};
  endfunction
  function automatic uinst_t inv(ra_t dst, opnd_t a);
    return '{op: UOP_INV, par: 1'b0, a: a, b: '0, c: R_ZERO, dst: dst};
  endfunction
  localparam uinst_t END = '{op: UOP_END, par: 1'b0, a: '0, b: '0, c: R_ZERO, dst: R_ZERO};

  always_comb begin
    unique case (pc)
      // ---- DBL: Q = 2Q (projective) -------------------------------------
      // resultant, k = ((f - hV - V^2)/U) and s = k * inv mod u
      7'd0:  ir = mulp(R_T0, o1(R_U1), o1(R_Z));                        // w3 = U1 Z
      7'd1:  ir = mul (R_T1, o1(R_Z), o1(R_V1));                        // t  = Z V1
      7'd2:  ir = mulp(R_T2, o1(R_U1), o1(R_U1, 2'd1));                 // a  = U1 w1, w1 = U1^2
      7'd3:  ir = mul (R_T3, o1(R_U1, 2'd1), o1(R_Z));                  // w5 = w1 Z
      7'd4:  ir = mulp(R_T1, o1(R_Z), o2(R_T1, R_V1, 2'd0, 2'd1), R_T2); // k0 = a + Z(t + V1^2)
      7'd5:  ir = mul (R_T4, o1(R_Z), o1(R_U0));                        // zu = Z U0
      7'd6:  ir = mulp(R_T2, o1(R_T1), o1(R_T0));                       // w4 = k0 w3
      7'd7:  ir = mul (R_T5, o1(R_Z, 2'd2), o1(R_U0));                  // R  = Z^4 U0
      7'd8:  ir = mulp(R_T0, o2(R_T0, R_Z), o2(R_T1, R_U1, 2'd0, 2'd1), R_T2); // (w3+Z)(k0+w1) + w4
      7'd9:  ir = mul (R_T1, o1(R_T4), o1(R_T3), R_T2);                 // s0 = w4 + Z U0 w5
      7'd10: ir = mul (R_T0, o2(R_ONE, R_U1), o1(R_T3), R_T0);          // s3 = ... + (1+U1) w5
      // precomputations
      7'd11: ir = mulp(R_T2, o1(R_T0), o1(R_Z));                        // s1 = s3 Z
      7'd12: ir = mul (R_T3, o1(R_T1), o1(R_T0));                       // s5 = s0 s3
      7'd13: ir = mulp(R_T4, o1(R_T5), o1(R_T0));                       // R s3
      7'd14: ir = mul (R_T6, o1(R_T0), o1(R_T2));                       // s4 = s3 s1
      7'd15: ir = mulp(R_T0, o1(R_T5), o1(R_T2));                       // R~ = R s1
      7'd16: ir = mul (R_T7, o1(R_T3), o1(R_Z));                        // S  = s5 Z
      // l = s * u
      7'd17: ir = mulp(R_T8, o1(R_U1), o1(R_T6));                       // l2 = U1 s4
      7'd18: ir = mul (R_T9, o1(R_U0), o1(R_T3));                       // l0 = U0 s5
      7'd19: ir = mulp(R_T10, o1(R_T0), o1(R_T6));                      // R'' = R~ s4
      7'd20: ir = mul (R_T6, o2(R_T6, R_T3), o2(R_U1, R_U0), R_T8);     // (s4+s5)(U1+U0) + l2
      7'd21: ir = mulp(R_T4, o1(R_T4), o1(R_Z));                        // X = R s3 Z
      7'd22: ir = mul (R_T3, o1(R_T2, 2'd1), o1(R_T9));                 // y = S1 l0, S1 = s1^2
      7'd23: ir = lin (R_T6, o2(R_T6, R_T9));                           // l1 = ... + l0
      // U'' and the final products
      7'd24: ir = lin (R_T4, o2(R_T1, R_T4, 2'd1, 2'd0));               // U0'' = S0 + X, S0 = s0^2
      7'd25: ir = lin (R_T7, o2(R_T7, R_T5, 2'd0, 2'd1), R_T8);         // l3 = l2 + S + U1'', U1'' = R^2
      7'd26: ir = mulp(R_T3, o1(R_T4), o1(R_T7), R_T3);                 // w6 = U0'' l3 + S1 l0
      7'd27: ir = mul (R_T8, o1(R_T5, 2'd1), o1(R_T7));                 // U1'' l3
      7'd28: ir = mulp(R_T8, o1(R_T2, 2'd1), o2(R_T4, R_T6), R_T8);     // w7 = U1'' l3 + S1 (U0''+l1)
      7'd29: ir = mul (R_Z,  o1(R_T2, 2'd1), o1(R_T0));                 // Z'  = S1 R~
      7'd30: ir = mulp(R_U1, o1(R_T0), o1(R_T5, 2'd1));                 // U1' = R~ U1''
      7'd31: ir = mul (R_U0, o1(R_T0), o1(R_T4));                       // U0' = R~ U0''
      7'd32: ir = mulp(R_V0, o1(R_T10), o1(R_V0), R_T3);                // V0' = w6 + R'' V0
      7'd33: ir = mul (R_V1, o1(R_T10), o1(R_V1), R_T8);                // w7 + R'' V1
      7'd34: ir = lin (R_V1, o2(R_V1, R_Z));                            // V1' = ... + Z'
      7'd35: ir = END;

      // ---- ADD: Q = Q + P, inversion-free (Q projective, P affine) ---------
      7'd40: ir = mulp(R_T0, o1(R_PU1), o1(R_Z), R_U1);                 // Z1 = U11 + u21 Z
      7'd41: ir = mul (R_T1, o1(R_PU0), o1(R_Z), R_U0);                 // Z2 = U10 + u20 Z
      7'd42: ir = mulp(R_T2, o1(R_PV0), o1(R_Z), R_V0);                 // W0 = V10 + v20 Z
      7'd43: ir = mul (R_T3, o1(R_PV1), o1(R_Z), R_V1);                 // W1 = V11 + v21 Z
      7'd44: ir = mulp(R_T4, o1(R_U1), o1(R_T0));                       // U11 Z1
      7'd45: ir = mul (R_T4, o1(R_Z), o1(R_T1), R_T4);                  // Z3 = U11 Z1 + Z Z2
      7'd46: ir = mulp(R_T5, o1(R_T0), o1(R_T3));                       // W3 = Z1 W1
      7'd47: ir = mul (R_T6, o1(R_T1), o1(R_T3));                       // Z2 W1
      7'd48: ir = mulp(R_T6, o1(R_T0), o1(R_T2), R_T6);                 // S1a = Z2 W1 + Z1 W0
      7'd49: ir = mul (R_T7, o1(R_T1), o1(R_T4));                       // Z2 Z3
      7'd50: ir = mulp(R_T7, o1(R_T0, 2'd1), o1(R_U0), R_T7);           // R = Z2 Z3 + Z1^2 U10
      7'd51: ir = mul (R_T8, o1(R_T4), o1(R_T2));                       // Z3 W0
      7'd52: ir = mulp(R_T8, o1(R_U0), o1(R_T5), R_T8);                 // S0 = Z3 W0 + U10 W3
      7'd53: ir = mul (R_T6, o1(R_Z), o1(R_T6));                        // S1 = Z S1a
      7'd54: ir = mulp(R_T1, o1(R_Z), o1(R_T6));                        // T = Z S1
      7'd55: ir = mul (R_T5, o1(R_Z), o1(R_T7));                        // q = Z R
      7'd56: ir = mulp(R_T2, o1(R_Z), o1(R_T8));                        // a = Z S0
      7'd57: ir = mul (R_T4, o1(R_T0), o1(R_T6));                       // c = Z1 S1
      7'd58: ir = mulp(R_T3, o1(R_U1), o1(R_T6));                       // b = U11 S1
      7'd59: ir = mul (R_T0, o1(R_PU1), o1(R_T2));                      // u21 a
      7'd60: ir = mulp(R_T0, o1(R_PU0), o1(R_T1), R_T0);                // L1 = u21 a + u20 T
      7'd61: ir = mul (R_T6, o1(R_U0), o1(R_T6));                       // U10 S1
      7'd62: ir = mulp(R_T7, o1(R_T4), o1(R_T1));                       // c T
      7'd63: ir = mul (R_T8, o2(R_T2, R_T3), o2(R_T2, R_T4));           // (a + b)(a + c)
      7'd64: ir = lin (R_T7, o2(R_T7, R_T5, 2'd0, 2'd1));               // N1 = c T + q^2
      7'd65: ir = lin (R_T6, o2(R_T6, R_T0), R_T5);                     // U10 S1 + L1 + q
      7'd66: ir = mulp(R_T8, o1(R_T6), o1(R_T1), R_T8);                 // X = (U10 S1 + L1 + q) T + (a + b)(a + c)
      7'd67: ir = mul (R_T4, o1(R_T4), o1(R_T5, 2'd1));                 // c q^2
      7'd68: ir = mulp(R_T9, o1(R_T1), o1(R_T8), R_T4);                 // N0 = T X + c q^2
      7'd69: ir = mul (R_T3, o1(R_PU1), o1(R_T1), R_T2);                // L2 = u21 T + a
      7'd70: ir = mulp(R_T3, o1(R_T3), o1(R_T1), R_T7);                 // W = L2 T + N1
      7'd71: ir = mul (R_T0, o1(R_T0), o1(R_T1, 2'd1));                 // L1 T^2
      7'd72: ir = mulp(R_T6, o1(R_T7), o1(R_T3));                       // N1 W
      7'd73: ir = mul (R_T6, o1(R_T1), o2(R_T9, R_T0), R_T6);           // Y = N1 W + T (N0 + L1 T^2)
      7'd74: ir = mulp(R_T0, o1(R_T1, 2'd1), o1(R_T5));                 // T^2 q
      7'd75: ir = mul (R_T4, o1(R_T1), o1(R_T5));                       // T q
      7'd76: ir = mulp(R_U1, o1(R_T7), o1(R_T0));                       // U1' = N1 T^2 q
      7'd77: ir = mul (R_Z,  o1(R_T1, 2'd1), o1(R_T0));                 // Z' = T^4 q
      7'd78: ir = mulp(R_U0, o1(R_T9), o1(R_T4));                       // U0' = N0 T q
      7'd79: ir = mul (R_T3, o1(R_T9), o1(R_T3));                       // N0 W
      7'd80: ir = mulp(R_T7, o2(R_ONE, R_PV1), o1(R_Z));                // (1 + v21) Z'
      7'd81: ir = mul (R_V1, o1(R_T1), o1(R_T6), R_T7);                 // V1' = T Y + (1 + v21) Z'
      7'd82: ir = mulp(R_T8, o1(R_PU0), o1(R_T2));                      // u20 a
      7'd83: ir = mul (R_T8, o1(R_PV0), o1(R_T5), R_T8);                // u20 a + v20 q
      7'd84: ir = mul (R_V0, o1(R_T1, 2'd2), o1(R_T8), R_T3);           // V0' = T^4 (u20 a + v20 q) + N0 W
      7'd85: ir = END;

      // ---- AFF: Q to affine form ------------------------------------------
      7'd88: ir = inv (R_T0, o1(R_Z));
      7'd89: ir = mulp(R_U1, o1(R_U1), o1(R_T0));
      7'd90: ir = mul (R_U0, o1(R_U0), o1(R_T0));
      7'd91: ir = mulp(R_V1, o1(R_V1), o1(R_T0));
      7'd92: ir = mul (R_V0, o1(R_V0), o1(R_T0));
      7'd93: ir = lin (R_Z,  o1(R_ONE));
      7'd94: ir = END;

      // ---- INIT: Q = P --------------------------------------------------
      7'd96:  ir = lin (R_U1, o1(R_PU1));
      7'd97:  ir = lin (R_U0, o1(R_PU0));
      7'd98:  ir = lin (R_V1, o1(R_PV1));
      7'd99:  ir = lin (R_V0, o1(R_PV0));
      7'd100: ir = lin (R_Z,  o1(R_ONE));
      default: ir = END;
    endcase
  end
endmodule
