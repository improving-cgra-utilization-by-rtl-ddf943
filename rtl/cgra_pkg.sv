// cgra_pkg -- types and constants shared by the paged CGRA.
//
// The accelerator is a grid of processing elements (PEs) that each execute one
// instruction per cycle from a local instruction memory. This package defines
// that instruction word, the operation set of the functional unit, the operand
// sources of the two input multiplexers, the request a PE puts on its page's
// load/store bus, and the configuration record of a page sequencer.
//
// What follows the source architecture: the PE has two operand multiplexers
// fed by neighbours, memory and a rotating register file; the functional unit
// does integer ALU work (add, subtract, shift, bitwise) and "complex" work
// (multiply, divide). A store needs two PEs of the same column in one cycle,
// one giving the address and one the data. Everything else -- the exact opcode
// list, encodings, field widths, 32-bit data -- is this design's own choice.
package cgra_pkg;

  // ---------------------------------------------------------------- widths
  parameter int unsigned DATA_W   = 32;  // datapath width
  parameter int unsigned RF_DEPTH = 8;   // rotating registers per PE
  parameter int unsigned RF_AW    = $clog2(RF_DEPTH);
  parameter int unsigned IMM_W    = 12;  // signed immediate in the instruction

  typedef logic [DATA_W-1:0] data_t;

  // ------------------------------------------------------ FU operations
  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,   // nothing; output register holds
    OP_PASS    = 5'd1,   // y = a (routing)
    OP_ADD     = 5'd2,
    OP_SUB     = 5'd3,
    OP_AND     = 5'd4,
    OP_OR      = 5'd5,
    OP_XOR     = 5'd6,
    OP_SLL     = 5'd7,
    OP_SRL     = 5'd8,
    OP_SRA     = 5'd9,
    OP_SLT     = 5'd10,  // signed a < b
    OP_SLTU    = 5'd11,  // unsigned a < b
    OP_MUL     = 5'd12,  // low DATA_W bits of a*b
    OP_DIV     = 5'd13,  // unsigned a / b
    OP_REM     = 5'd14,  // unsigned a % b
    OP_LD      = 5'd15,  // load: address = a + b, data on the page bus next cycle
    OP_ST_ADDR = 5'd16,  // store, address half: address = a + b
    OP_ST_DATA = 5'd17   // store, data half: data = a
  } op_e;

  // --------------------------------------- operand multiplexer sources
  typedef enum logic [3:0] {
    SRC_ZERO = 4'd0,
    SRC_N    = 4'd1,   // output register of the PE above (row-1)
    SRC_S    = 4'd2,   // below (row+1)
    SRC_E    = 4'd3,   // right (col+1)
    SRC_W    = 4'd4,   // left  (col-1)
    SRC_SELF = 4'd5,   // this PE's own output register
    SRC_RF   = 4'd6,   // rotating register file read port
    SRC_IMM  = 4'd7,   // sign-extended immediate
    SRC_MEM  = 4'd8    // load data on this page's bus
  } src_e;

  // ---------------------------------------------------- instruction word
  typedef struct packed {
    op_e              op;
    src_e             src_a;
    src_e             src_b;
    logic             rf_we;     // write FU result into RF[rf_waddr]
    logic [RF_AW-1:0] rf_waddr;  // logical index (rotated)
    logic [RF_AW-1:0] rf_raddr;  // logical index (rotated)
    logic [IMM_W-1:0] imm;
  } pe_instr_t;

  localparam pe_instr_t INSTR_NOP = '{op: OP_NOP, src_a: SRC_ZERO, src_b: SRC_ZERO,
                                     rf_we: 1'b0, rf_waddr: '0, rf_raddr: '0, imm: '0};

  // ------------------------------------------------ PE -> page bus request
  typedef struct packed {
    logic  addr_vld;   // PE drives the bus address (LD or ST_ADDR)
    logic  is_store;   // with addr_vld: the address is a store address
    data_t addr;       // word address
    logic  data_vld;   // PE drives the store data (ST_DATA)
    data_t data;
  } pe_mem_req_t;

  // ------------------------------------------- page sequencer configuration
  // Instructions base..loop_start-1 are the prologue, loop_start..loop_end the
  // kernel (run iters times), loop_end+1..last the epilogue.
  parameter int unsigned PC_W   = 8;   // wide enough for any IMEM_DEPTH used
  parameter int unsigned ITER_W = 16;

  typedef struct packed {
    logic [PC_W-1:0]   base;
    logic [PC_W-1:0]   loop_start;
    logic [PC_W-1:0]   loop_end;
    logic [PC_W-1:0]   last;
    logic [ITER_W-1:0] iters;
  } page_cfg_t;

endpackage
