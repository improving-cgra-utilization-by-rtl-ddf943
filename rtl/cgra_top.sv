// cgra_top -- a CGRA accelerator that several threads can share at once.
//
// The array is divided into pages of PAGE_PES PEs (a column segment). A
// compiler schedules each loop kernel onto a ring of pages; at run time the
// host transforms a schedule onto as many free pages as it is given and loads
// it. Because every page has its own instruction memory, counter and
// load/store bus, unrelated kernels placed on disjoint page sets run side by
// side without interfering, while pages started together in the same cycle
// run in lock-step as one schedule and exchange data over the mesh.
//
// Blocks: cgra_array (PEs + mesh), per page a cgra_page_seq, cgra_imem and
// cgra_page_bus, and one cgra_dmem shared by all page buses plus the host port.
//
// Host interface (all synchronous to clk, active-low synchronous reset):
//   imem_we/page/slot/addr/wdata : write one PE instruction of a page
//   cfg_we/cfg_page/cfg_wdata    : write a page's program window (page_cfg_t)
//   start_mask                   : one-cycle pulse, starts the marked pages
//   busy, done                   : per page running / sticky finished
//   host_req/we/addr/wdata/rdata : data-memory port (read data next cycle)
//   bus_error                    : per page sticky bus-rule violation
// Timing: a started page executes its first instruction in the next cycle and
// one instruction per cycle after that, without stalls; busy falls and done
// rises after the last one.
//
// From the source: the PE grid with neighbour mesh, PE contents, local
// instruction and data memory, the 64 KB data memory, 8x8 array with 4-PE pages,
// one load/store per bus per cycle and two-PE stores. This design's own
// choices: per-page counters and instruction memories, per-page bus segments,
// the host interface, all encodings and widths.
module cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS       = 8,
  parameter int unsigned COLS       = 8,
  parameter int unsigned PAGE_PES   = 4,
  parameter int unsigned IMEM_DEPTH = 64,
  parameter int unsigned DMEM_WORDS = 16384,
  localparam int unsigned NUM_PAGES  = (ROWS / PAGE_PES) * COLS,
  localparam int unsigned PAGE_IDX_W = (NUM_PAGES > 1) ? $clog2(NUM_PAGES) : 1,
  localparam int unsigned SLOT_W     = (PAGE_PES > 1) ? $clog2(PAGE_PES) : 1,
  localparam int unsigned IMEM_AW    = $clog2(IMEM_DEPTH),
  localparam int unsigned DMEM_AW    = $clog2(DMEM_WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instruction load
  input  logic                  imem_we,
  input  logic [PAGE_IDX_W-1:0] imem_page,
  input  logic [SLOT_W-1:0]     imem_slot,
  input  logic [IMEM_AW-1:0]    imem_addr,
  input  pe_instr_t             imem_wdata,
  // page configuration and control
  input  logic                  cfg_we,
  input  logic [PAGE_IDX_W-1:0] cfg_page,
  input  page_cfg_t             cfg_wdata,
  input  logic [NUM_PAGES-1:0]  start_mask,
  output logic [NUM_PAGES-1:0]  busy,
  output logic [NUM_PAGES-1:0]  done,
  output logic [NUM_PAGES-1:0]  bus_error,
  // host / DMA data-memory port
  input  logic                  host_req,
  input  logic                  host_we,
  input  logic [DMEM_AW-1:0]    host_addr,
  input  data_t                 host_wdata,
  output data_t                 host_rdata
);

  localparam int unsigned NPORTS = NUM_PAGES + 1;

  pe_instr_t [PAGE_PES-1:0]   page_instr [NUM_PAGES];
  pe_mem_req_t [PAGE_PES-1:0] page_req   [NUM_PAGES];
  data_t                      page_rdata [NUM_PAGES];
  logic [NUM_PAGES-1:0]       page_rotate;
  data_t                      pe_out     [ROWS][COLS];

  logic [NPORTS-1:0]  dm_en, dm_we;
  logic [DMEM_AW-1:0] dm_addr  [NPORTS];
  data_t              dm_wdata [NPORTS];
  data_t              dm_rdata [NPORTS];

  for (genvar p = 0; p < NUM_PAGES; p++) begin : g_page
    logic [IMEM_AW-1:0] pc;

    cgra_page_seq #(.DEPTH(IMEM_DEPTH)) u_seq (
      .clk, .rst_n,
      .cfg_we (cfg_we && cfg_page == PAGE_IDX_W'(p)),
      .cfg_in (cfg_wdata),
      .start  (start_mask[p]),
      .pc     (pc),
      .active (busy[p]),
      .rotate (page_rotate[p]),
      .done   (done[p])
    );

    cgra_imem #(.PAGE_PES(PAGE_PES), .DEPTH(IMEM_DEPTH)) u_imem (
      .clk,
      .we    (imem_we && imem_page == PAGE_IDX_W'(p)),
      .waddr (imem_addr),
      .wslot (imem_slot),
      .wdata (imem_wdata),
      .raddr (pc),
      .rdata (page_instr[p])
    );

    cgra_page_bus #(.PAGE_PES(PAGE_PES), .AW(DMEM_AW)) u_bus (
      .clk, .rst_n,
      .req       (page_req[p]),
      .mem_en    (dm_en[p]),
      .mem_we    (dm_we[p]),
      .mem_addr  (dm_addr[p]),
      .mem_wdata (dm_wdata[p]),
      .err_now   (),
      .err       (bus_error[p])
    );

    assign page_rdata[p] = dm_rdata[p];
  end

  cgra_array #(.ROWS(ROWS), .COLS(COLS), .PAGE_PES(PAGE_PES)) u_array (
    .clk, .rst_n,
    .page_instr  (page_instr),
    .page_en     (busy),
    .page_rotate (page_rotate),
    .page_rdata  (page_rdata),
    .page_req    (page_req),
    .pe_out      (pe_out)
  );

  // host port is the last data-memory port
  assign dm_en[NUM_PAGES]    = host_req;
  assign dm_we[NUM_PAGES]    = host_we;
  assign dm_addr[NUM_PAGES]  = host_addr;
  assign dm_wdata[NUM_PAGES] = host_wdata;
  assign host_rdata          = dm_rdata[NUM_PAGES];

  cgra_dmem #(.W(DATA_W), .WORDS(DMEM_WORDS), .NPORTS(NPORTS)) u_dmem (
    .clk,
    .en    (dm_en),
    .we    (dm_we),
    .addr  (dm_addr),
    .wdata (dm_wdata),
    .rdata (dm_rdata)
  );

endmodule
