// cgra_rotating_rf -- rotating register file of one PE.
//
// DEPTH registers addressed through a rotating base: the physical register is
// (logical index + base) mod DEPTH. The base steps down by one on every
// `rotate` pulse, which the page sequencer gives at each kernel iteration
// boundary. A value written as r[k] in one iteration is therefore read as
// r[k+1] in the next, so a modulo-scheduled loop can keep the values of
// several overlapping iterations apart without renaming them in the code. The
// run-time schedule transform uses these registers to hold a value for a page
// that executes later than it did in the original schedule.
//
// Timing: one write port and one combinational read port, both in logical
// indices relative to the base of the current cycle. A write lands at the
// clock edge; a read in the same cycle returns the old contents. On `rotate`
// the new base applies from the next cycle. Reset clears the base and the
// registers. The source names a rotating register file; the rotation rule,
// depth and reset are this design's choices (DEPTH must be a power of two).
module cgra_rotating_rf
  import cgra_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DEPTH = RF_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rotate,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0]  regs [DEPTH];
  logic [AW-1:0] rrb;                 // rotating register base

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rrb <= '0;
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else begin
      if (we) regs[AW'(waddr + rrb)] <= wdata;
      if (rotate) rrb <= rrb - 1'b1;
    end
  end

  assign rdata = regs[AW'(raddr + rrb)];

endmodule
