// cgra_imem -- instruction memory of one page.
//
// DEPTH words; a word holds one instruction for each of the PAGE_PES PEs of the
// page, so one read feeds the whole page for one cycle. The host (through the
// DMA path) writes one PE's instruction at a time; the page sequencer reads a
// word combinationally, so the instruction is at the PEs in the same cycle as
// its address. The source draws one local instruction memory; splitting it per
// page (so pages can run unrelated schedules), the depth and the combinational
// read are this design's choices. Contents are not reset.
module cgra_imem
  import cgra_pkg::*;
#(
  parameter int unsigned PAGE_PES = 4,
  parameter int unsigned DEPTH    = 64,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned SW      = (PAGE_PES > 1) ? $clog2(PAGE_PES) : 1
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic [AW-1:0]                waddr,
  input  logic [SW-1:0]                wslot,
  input  pe_instr_t                    wdata,
  input  logic [AW-1:0]                raddr,
  output pe_instr_t [PAGE_PES-1:0]     rdata
);

  pe_instr_t [PAGE_PES-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][wslot] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
