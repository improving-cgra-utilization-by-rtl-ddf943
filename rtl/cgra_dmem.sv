// cgra_dmem -- local data memory of the CGRA.
//
// WORDS words of W bits (default 16384 x 32 bits = 64 KB, the data-memory size
// of the evaluated systems). NPORTS ports: one per page bus and, as the last
// port, the host/DMA port that fills input buffers and drains results. Each
// port performs one access per cycle: a write lands at the clock edge; a read
// returns the old word on rdata in the next cycle and rdata holds until that
// port's next read. Two writes to one address in a cycle: the higher port
// wins. The multi-port organisation is this design's choice; the source only
// gives the memory and its size. Contents are not reset.
module cgra_dmem
  import cgra_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter int unsigned WORDS  = 16384,
  parameter int unsigned NPORTS = 17,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic                clk,
  input  logic [NPORTS-1:0]   en,
  input  logic [NPORTS-1:0]   we,
  input  logic [AW-1:0]       addr  [NPORTS],
  input  logic [W-1:0]        wdata [NPORTS],
  output logic [W-1:0]        rdata [NPORTS]
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (en[p] && we[p]) mem[addr[p]] <= wdata[p];
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (en[p] && !we[p]) rdata[p] <= mem[addr[p]];
    end
  end

endmodule
