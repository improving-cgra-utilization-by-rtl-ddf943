// cgra_array -- the PE grid and its mesh interconnect.
//
// ROWS x COLS PEs. Every PE reads the output registers of its four nearest
// neighbours (N = row-1, S = row+1, W = col-1, E = col+1); the mesh is uniform
// and symmetric, which the page transform needs, and has no wrap-around: a
// link that would leave the array reads zero. Pages are PAGE_PES vertically
// adjacent PEs of one column; PE (r, c) belongs to page
// (r / PAGE_PES) * COLS + c and is slot r % PAGE_PES of that page. Per page the
// array takes one instruction word (one slot per PE), an enable, an RF rotate
// pulse and the load data of the page's bus, and returns the PEs' bus
// requests. The mesh and the page division follow the source; edge zeros and
// page numbering are this design's choices. Purely structural: all timing is
// in the PEs (results registered, visible to neighbours next cycle).
module cgra_array
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned COLS      = 8,
  parameter int unsigned PAGE_PES  = 4,
  localparam int unsigned NUM_PAGES = (ROWS / PAGE_PES) * COLS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  pe_instr_t [PAGE_PES-1:0]        page_instr [NUM_PAGES],
  input  logic [NUM_PAGES-1:0]            page_en,
  input  logic [NUM_PAGES-1:0]            page_rotate,
  input  data_t                           page_rdata [NUM_PAGES],
  output pe_mem_req_t [PAGE_PES-1:0]      page_req   [NUM_PAGES],
  output data_t                           pe_out     [ROWS][COLS]
);

  initial begin
    assert (ROWS % PAGE_PES == 0) else $error("PAGE_PES must divide ROWS");
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned PG   = (r / PAGE_PES) * COLS + c;
      localparam int unsigned SLOT = r % PAGE_PES;
      data_t n, s, e, w;
      if (r > 0)        begin : g_n assign n = pe_out[r-1][c]; end
      else              begin : g_n0 assign n = '0; end
      if (r < ROWS - 1) begin : g_s assign s = pe_out[r+1][c]; end
      else              begin : g_s0 assign s = '0; end
      if (c < COLS - 1) begin : g_e assign e = pe_out[r][c+1]; end
      else              begin : g_e0 assign e = '0; end
      if (c > 0)        begin : g_w assign w = pe_out[r][c-1]; end
      else              begin : g_w0 assign w = '0; end

      cgra_pe u_pe (
        .clk, .rst_n,
        .en        (page_en[PG]),
        .instr     (page_instr[PG][SLOT]),
        .rotate    (page_rotate[PG]),
        .nb_n      (n),
        .nb_s      (s),
        .nb_e      (e),
        .nb_w      (w),
        .mem_rdata (page_rdata[PG]),
        .out       (pe_out[r][c]),
        .req       (page_req[PG][SLOT])
      );
    end
  end

endmodule
