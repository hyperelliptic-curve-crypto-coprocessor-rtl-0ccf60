// hecc_regfile: the coprocessor's register file, a memory of ENTRIES field words.
//
// It holds the base divisor, the running divisor and the temporaries of the
// group-operation formulae. Two read ports are combinational (the operand bus
// reads a two-source operand in one cycle); the single write port is synchronous.
// Addresses 0 and 1 are not stored: they read as the constants 0 and 1 and
// writes to them are dropped. Addresses at or above ENTRIES read as 0. The
// memory is not reset; the micro-code writes every word before reading it.
module hecc_regfile #(
  parameter int unsigned M       = hecc_pkg::M,
  parameter int unsigned ENTRIES = hecc_pkg::RF_ENTRIES,
  parameter int unsigned AW      = hecc_pkg::RA_W
) (
  input  logic          clk,
  input  logic [AW-1:0] ra0,
  output logic [M-1:0]  rd0,
  input  logic [AW-1:0] ra1,
  output logic [M-1:0]  rd1,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [M-1:0]  wd
);
  logic [M-1:0] mem [ENTRIES];

  function automatic logic [M-1:0] rd(input logic [AW-1:0] ra, input logic [M-1:0] w);
    if (ra == AW'(0))                   return '0;
    else if (ra == AW'(1))              return M'(1);
    else if (int'(ra) >= int'(ENTRIES)) return '0;
    else                                return w;
  endfunction

  assign rd0 = rd(ra0, mem[int'(ra0) % int'(ENTRIES)]);
  assign rd1 = rd(ra1, mem[int'(ra1) % int'(ENTRIES)]);

  always_ff @(posedge clk) begin
    if (we && wa > AW'(1) && int'(wa) < int'(ENTRIES)) mem[wa] <= wd;
  end

  // A write must name a stored entry.
  property p_wr_addr;
    @(posedge clk) we |-> (wa > AW'(1) && int'(wa) < int'(ENTRIES));
  endproperty
  a_wr_addr: assert property (p_wr_addr) else $error("hecc_regfile: write to read-only or missing address %0d", wa);
endmodule
