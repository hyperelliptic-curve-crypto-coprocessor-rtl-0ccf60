// hecc_group_unit: group-operation unit of the coprocessor. It executes the
// micro-coded group operations (doubling, addition, conversion to affine form,
// initialisation) on a shared field arithmetic unit: two digit-serial
// multipliers and one MAIA inverter.
//
// Operands travel from the register file to the field units over one operand
// bus, one operand per cycle; the bus passes through hecc_operand, which adds
// two register values and squares them on the way. Results return through the
// write port, where one more register value can be added.
//
// The sequencer has two halves that overlap:
//   front end  FETCH  read the instruction (and, for a pair, the next one)
//              RDA    operand A of the current slot onto the bus (LIN/INV: A only)
//              RDB    operand B of the current slot onto the bus (RDA/RDB again
//                     for slot 1)
//              READY  wait until the back end is free, then issue
//   back end   WAIT   multiplier(s) or inverter running (d cycles to multiply)
//              WB     write dst = result + R[c], once per slot
// While the multipliers work on one instruction, the front end already fetches
// the next one and moves its operands. It stalls while it would read a register
// that the instruction in flight has still to write, and during write-back,
// which uses read port 0 for c. The next instruction issues in the last
// write-back cycle, so without stalls a pair takes d + 2 cycles from issue to
// issue (8 at d = 6); the schedule of the formulae and the
// register allocation are in hecc_ucode_rom.
//
// Interface: `start` with `gop` begins a routine when `busy` is low; `done`
// pulses for one cycle at its end. `exc` is set when a routine gives the
// inverter zero or writes Z = 0, and is cleared by the next start: the operands
// then fall outside the general case the formulae cover, and the result is not
// valid. The register-file ports are driven whenever the unit is busy. `n_pair`, `n_mul`, `n_lin` and `n_inv` count the executed
// micro-instructions (free-running, for observation).
module hecc_group_unit
  import hecc_pkg::*;
#(
  parameter int unsigned D      = 16,
  parameter int unsigned UNROLL = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  gop_e        gop,
  output logic        busy,
  output logic        done,
  output logic        exc,
  // register-file ports
  output ra_t         rf_ra0,
  input  fe_t         rf_rd0,
  output ra_t         rf_ra1,
  input  fe_t         rf_rd1,
  output logic        rf_we,
  output ra_t         rf_wa,
  output fe_t         rf_wd,
  // activity counters
  output logic [31:0] n_pair,
  output logic [31:0] n_mul,
  output logic [31:0] n_lin,
  output logic [31:0] n_inv
);
  // Front end: fetches a micro-instruction and moves its operands over the bus.
  // Back end: the running multiplication or inversion and its write-back.
  typedef enum logic [2:0] {F_IDLE, F_FETCH, F_RDA, F_RDB, F_READY} fstate_e;
  typedef enum logic [1:0] {B_IDLE, B_WAIT, B_WB} bstate_e;

  fstate_e fstate;
  bstate_e bstate;
  upc_t    pc;
  uinst_t  ir [2];           // front end: instruction(s) being read
  uinst_t  bir [2];          // back end: instruction(s) in flight
  uinst_t  rom_ir0, rom_ir1;
  logic    pair, slot;       // front end
  logic    bpair, bslot;     // back end
  fe_t     opa [2];
  fe_t     opb [2];
  fe_t     blin;             // LIN result waiting for write-back
  fe_t     bus;
  opnd_t   bus_sel;
  logic    hazard, rd_ok, issue;

  logic    mul_start, inv_start;
  logic    mul0_done, mul1_done, mul0_busy, mul1_busy, inv_done, inv_busy, inv_zero;
  fe_t     mul0_p, mul1_p, inv_y;
  logic    mul0_fin, mul1_fin;

  hecc_ucode_rom u_rom0 (.pc(pc),            .ir(rom_ir0));
  hecc_ucode_rom u_rom1 (.pc(pc + upc_t'(1)), .ir(rom_ir1));

  // Operand bus: the selected two sources, added and squared on the way.
  always_comb begin
    bus_sel = (fstate == F_RDB) ? ir[slot].b : ir[slot].a;
  end

  hecc_operand u_opnd (
    .x0(rf_rd0), .pw0(bus_sel.s0.pw),
    .x1(rf_rd1), .pw1(bus_sel.s1.pw),
    .y (bus)
  );

  // A source that an instruction in flight has yet to write must not be read;
  // the write-back owns read port 0 (for c) while it runs.
  function automatic logic pending(ra_t r);
    return (bstate != B_IDLE) &&
           (r == bir[0].dst || (bpair && r == bir[1].dst));
  endfunction
  always_comb begin
    hazard = pending(bus_sel.s0.ra) || pending(bus_sel.s1.ra);
    rd_ok  = !hazard && (bstate != B_WB);
    // The next instruction may issue in the last write-back cycle: the units'
    // results change only after that clock edge.
    issue  = (fstate == F_READY) &&
             (bstate == B_IDLE || (bstate == B_WB && (!bpair || bslot)));
  end

  gf_mul #(.D(D)) u_mul0 (
    .clk, .rst_n, .start(mul_start), .a(opa[0]), .b(opb[0]),
    .busy(mul0_busy), .done(mul0_done), .p(mul0_p)
  );
  gf_mul #(.D(D)) u_mul1 (
    .clk, .rst_n, .start(mul_start && pair), .a(opa[1]), .b(opb[1]),
    .busy(mul1_busy), .done(mul1_done), .p(mul1_p)
  );
  gf_inv #(.UNROLL(UNROLL)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(opa[0]),
    .busy(inv_busy), .done(inv_done), .zero_in(inv_zero), .y(inv_y)
  );

  // Register-file read addresses: operand sources, or c during write-back.
  always_comb begin
    rf_ra0 = bus_sel.s0.ra;
    rf_ra1 = bus_sel.s1.ra;
    if (bstate == B_WB) begin
      rf_ra0 = bir[bslot].c;
      rf_ra1 = R_ZERO;
    end
  end

  // Write-back: result of the slot's unit plus R[c].
  always_comb begin
    fe_t res;
    unique case (bir[bslot].op)
      UOP_MUL: res = bslot ? mul1_p : mul0_p;
      UOP_INV: res = inv_y;
      default: res = blin;
    endcase
    rf_we = (bstate == B_WB);
    rf_wa = bir[bslot].dst;
    rf_wd = res ^ rf_rd0;
  end

  assign mul_start = issue && (ir[0].op == UOP_MUL);
  assign inv_start = issue && (ir[0].op == UOP_INV);
  assign busy      = (fstate != F_IDLE) || (bstate != B_IDLE);

  // Front end.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate <= F_IDLE;
      pc     <= '0;
      ir[0]  <= '0;
      ir[1]  <= '0;
      pair   <= 1'b0;
      slot   <= 1'b0;
      opa[0] <= '0;
      opa[1] <= '0;
      opb[0] <= '0;
      opb[1] <= '0;
      done   <= 1'b0;
      n_pair <= '0;
      n_mul  <= '0;
      n_lin  <= '0;
      n_inv  <= '0;
    end else begin
      done <= 1'b0;
      unique case (fstate)
        F_IDLE: if (start) begin
          unique case (gop)
            GOP_DBL: pc <= UPC_DBL;
            GOP_ADD: pc <= UPC_ADD;
            GOP_AFF: pc <= UPC_AFF;
            default: pc <= UPC_INIT;
          endcase
          fstate <= F_FETCH;
        end
        F_FETCH: begin
          ir[0]  <= rom_ir0;
          ir[1]  <= rom_ir1;
          pair   <= (rom_ir0.op == UOP_MUL) && rom_ir0.par;
          slot   <= 1'b0;
          fstate <= (rom_ir0.op == UOP_END) ? F_READY : F_RDA;
        end
        F_RDA: if (rd_ok) begin
          opa[slot] <= bus;
          fstate    <= (ir[slot].op == UOP_MUL) ? F_RDB : F_READY;
        end
        F_RDB: if (rd_ok) begin
          opb[slot] <= bus;
          if (pair && !slot) begin
            slot   <= 1'b1;
            fstate <= F_RDA;
          end else begin
            slot   <= 1'b0;
            fstate <= F_READY;
          end
        end
        F_READY: if (issue) begin
          pc     <= pc + (pair ? upc_t'(2) : upc_t'(1));
          fstate <= F_FETCH;
          unique case (ir[0].op)
            UOP_MUL: begin
              n_mul <= n_mul + (pair ? 32'd2 : 32'd1);
              if (pair) n_pair <= n_pair + 1;
            end
            UOP_INV: n_inv <= n_inv + 1;
            UOP_LIN: n_lin <= n_lin + 1;
            default: begin
              fstate <= F_IDLE;
              done   <= 1'b1;
            end
          endcase
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  // Back end.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate   <= B_IDLE;
      bir[0]   <= '0;
      bir[1]   <= '0;
      bpair    <= 1'b0;
      bslot    <= 1'b0;
      blin     <= '0;
      mul0_fin <= 1'b0;
      mul1_fin <= 1'b0;
      exc      <= 1'b0;
    end else begin
      if (fstate == F_IDLE && start) exc <= 1'b0;
      unique case (bstate)
        B_IDLE: ;
        B_WAIT: begin
          if (bir[0].op == UOP_INV) begin
            if (inv_done) begin
              bstate <= B_WB;
              if (inv_zero) exc <= 1'b1;
            end
          end else begin
            if (mul0_done) mul0_fin <= 1'b1;
            if (mul1_done) mul1_fin <= 1'b1;
            if ((mul0_done || mul0_fin) && (!bpair || mul1_done || mul1_fin)) bstate <= B_WB;
          end
        end
        B_WB: begin
          if (rf_wa == R_Z && rf_wd == '0) exc <= 1'b1;
          if (bpair && !bslot) begin
            bslot <= 1'b1;
          end else begin
            bslot  <= 1'b0;
            bstate <= B_IDLE;
          end
        end
        default: bstate <= B_IDLE;
      endcase
      if (issue && ir[0].op != UOP_END) begin
        bir[0]   <= ir[0];
        bir[1]   <= ir[1];
        bpair    <= pair;
        bslot    <= 1'b0;
        blin     <= opa[0];
        mul0_fin <= 1'b0;
        mul1_fin <= 1'b0;
        bstate   <= (ir[0].op == UOP_LIN) ? B_WB : B_WAIT;
      end
    end
  end

  // A pair is always two multiplications, units are idle when started, and
  // no operand is read from a register that is still to be written.
  a_pair_mul: assert property (@(posedge clk) disable iff (!rst_n)
    (fstate == F_RDA && pair) |-> (ir[0].op == UOP_MUL && ir[1].op == UOP_MUL));
  a_mul_idle: assert property (@(posedge clk) disable iff (!rst_n)
    mul_start |-> !mul0_busy && !mul1_busy);
  a_inv_idle: assert property (@(posedge clk) disable iff (!rst_n)
    inv_start |-> !inv_busy);
  a_no_raw: assert property (@(posedge clk) disable iff (!rst_n)
    ((fstate == F_RDA || fstate == F_RDB) && rd_ok) |-> !hazard);
endmodule
