// hecc_main_ctrl: main control unit; runs the scalar multiplication Q = k*P.
//
// Left-to-right binary method: the leading zero bits of k are skipped, Q is set
// to P for the leading one, and each following bit costs a doubling, plus an
// addition of P when the bit is one. The result is then converted to affine form
// (the projective coordinate Z divided out with one inversion). The group
// operations themselves run in hecc_group_unit; this unit only sequences them.
//
// It also moves data between the host ports and the register file: on `start`
// it writes the base divisor p_in = {u1, u0, v1, v0} into the register file
// (four cycles, through the write port it owns while `rf_own` is high), and at
// the end it reads the affine result back into r_out (four cycles). `done`
// pulses for one cycle when r_out is valid. For k = 0 the result is the neutral
// element: `r_zero` is set and r_out is zero. `r_exc` reports that a group
// operation met a case outside the general formulae (Z = 0 or an inversion of zero); r_out
// is then not k*P. `n_dbl`, `n_add` and `n_skip`
// count doublings, additions and skipped leading zeros of the last run.
module hecc_main_ctrl
  import hecc_pkg::*;
#(
  parameter int unsigned SCALAR_BITS = 178
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
  // group-operation unit
  output logic                   g_start,
  output gop_e                   g_op,
  input  logic                   g_done,
  input  logic                   g_exc,
  // register-file access while loading and unloading
  output logic                   rf_own,
  output ra_t                    rf_ra,
  input  fe_t                    rf_rd,
  output logic                   rf_we,
  output ra_t                    rf_wa,
  output fe_t                    rf_wd,
  // statistics of the last run
  output logic [15:0]            n_dbl,
  output logic [15:0]            n_add,
  output logic [15:0]            n_skip
);
  typedef enum logic [3:0] {
    C_IDLE, C_LOAD, C_SCAN, C_INIT, C_NEXT, C_DBL, C_ADD, C_AFF, C_WAIT, C_UNLOAD
  } cstate_e;

  localparam int unsigned CW = $clog2(SCALAR_BITS + 1);

  cstate_e                state, ret;
  logic [SCALAR_BITS-1:0] kreg;
  logic [CW-1:0]          left;     // bits of k still to be processed
  logic [1:0]             idx;

  localparam ra_t P_ADDR [4] = '{R_PU1, R_PU0, R_PV1, R_PV0};
  localparam ra_t Q_ADDR [4] = '{R_U1, R_U0, R_V1, R_V0};

  assign busy   = (state != C_IDLE);
  assign rf_own = (state == C_LOAD) || (state == C_UNLOAD);
  assign rf_we  = (state == C_LOAD);
  assign rf_wa  = P_ADDR[idx];
  assign rf_wd  = p_in[idx];
  assign rf_ra  = Q_ADDR[idx];

  always_comb begin
    g_start = 1'b0;
    g_op    = GOP_DBL;
    unique case (state)
      C_INIT: begin g_start = 1'b1; g_op = GOP_INIT; end
      C_DBL:  begin g_start = 1'b1; g_op = GOP_DBL;  end
      C_ADD:  begin g_start = 1'b1; g_op = GOP_ADD;  end
      C_AFF:  begin g_start = 1'b1; g_op = GOP_AFF;  end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= C_IDLE;
      ret    <= C_IDLE;
      kreg   <= '0;
      left   <= '0;
      idx    <= '0;
      done   <= 1'b0;
      r_zero <= 1'b0;
      r_exc  <= 1'b0;
      n_dbl  <= '0;
      n_add  <= '0;
      n_skip <= '0;
      for (int i = 0; i < 4; i++) r_out[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          kreg   <= k;
          left   <= CW'(SCALAR_BITS);
          idx    <= '0;
          n_dbl  <= '0;
          n_add  <= '0;
          n_skip <= '0;
          r_zero <= 1'b0;
          r_exc  <= 1'b0;
          if (k == '0) begin
            r_zero <= 1'b1;
            for (int i = 0; i < 4; i++) r_out[i] <= '0;
            done   <= 1'b1;
          end else begin
            state  <= C_LOAD;
          end
        end
        C_LOAD: begin
          idx <= idx + 1'b1;
          if (idx == 2'd3) state <= C_SCAN;
        end
        // skip leading zeros; the leading one itself is consumed by INIT
        C_SCAN: begin
          kreg <= kreg << 1;
          left <= left - 1'b1;
          if (kreg[SCALAR_BITS-1]) state <= C_INIT;
          else                     n_skip <= n_skip + 1'b1;
        end
        C_INIT: begin
          ret   <= C_NEXT;
          state <= C_WAIT;
        end
        C_NEXT: begin
          if (left == '0) state <= C_AFF;
          else            state <= C_DBL;
        end
        C_DBL: begin
          n_dbl <= n_dbl + 1'b1;
          ret   <= kreg[SCALAR_BITS-1] ? C_ADD : C_NEXT;
          kreg  <= kreg << 1;
          left  <= left - 1'b1;
          state <= C_WAIT;
        end
        C_ADD: begin
          n_add <= n_add + 1'b1;
          ret   <= C_NEXT;
          state <= C_WAIT;
        end
        C_AFF: begin
          ret   <= C_UNLOAD;
          state <= C_WAIT;
        end
        C_WAIT: if (g_done) begin
          state <= ret;
          if (g_exc) r_exc <= 1'b1;
          idx   <= '0;
        end
        C_UNLOAD: begin
          r_out[idx] <= rf_rd;
          idx        <= idx + 1'b1;
          if (idx == 2'd3) begin
            state <= C_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
