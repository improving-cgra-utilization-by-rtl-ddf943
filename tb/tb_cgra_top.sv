// tb_cgra_top -- end-to-end test of the paged CGRA at its default size
// (8x8 PEs, 4-PE pages, 16 pages, 64-entry instruction memories, 64 KB data
// memory).
//
// The host fills the data memory through the host port, loads hand-scheduled
// kernels into page instruction memories, and starts them at different times
// so that several threads share the array:
//   thread 1, page 0        : C[i] = s[i] + s[i-1], s[i] = A[i] + B[i], N1 = 12
//                             (the previous s comes from the rotating RF),
//                             epilogue stores the final index
//   thread 2, page 12       : same kernel on other data, N2 = 9
//   thread 3, pages 2 and 3 : lock-step two-page kernel D[i] = 3*X[i] + 5,
//                             product passed east over the mesh between pages
//   thread 4, page 7        : a deliberately broken store (address half only)
// Results are read back through the host port and compared with values
// computed here. Each page's run time is checked against prologue + II*N +
// epilogue cycles, and the mechanisms (loads, two-PE stores, kernel
// loop-backs / RF rotations, cross-page transfer, concurrent threads, lock-step
// start, bus-rule detection) are counted; one that never happens is a failure.
module tb_cgra_top;
  import cgra_pkg::*;

  localparam int NUM_PAGES = 16;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0, cfg_we = 0, host_req = 0, host_we = 0;
  logic [3:0] imem_page = 0, cfg_page = 0;
  logic [1:0] imem_slot = 0;
  logic [5:0] imem_addr = 0;
  pe_instr_t imem_wdata;
  page_cfg_t cfg_wdata;
  logic [NUM_PAGES-1:0] start_mask = '0, busy, done, bus_error;
  logic [13:0] host_addr = 0;
  data_t host_wdata = 0, host_rdata;

  int checks = 0, failures = 0;

  cgra_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  function automatic pe_instr_t mk(op_e op, src_e a = SRC_ZERO, src_e b = SRC_ZERO, int imm = 0,
                                   bit we = 0, int wa = 0, int ra = 0);
    pe_instr_t i = INSTR_NOP;
    i.op = op; i.src_a = a; i.src_b = b; i.imm = IMM_W'(imm);
    i.rf_we = we; i.rf_waddr = RF_AW'(wa); i.rf_raddr = RF_AW'(ra);
    return i;
  endfunction

  task automatic wr_instr(int page, int slot, int addr, pe_instr_t i);
    @(negedge clk);
    imem_we = 1; imem_page = 4'(page); imem_slot = 2'(slot); imem_addr = 6'(addr); imem_wdata = i;
    @(negedge clk); imem_we = 0;
  endtask

  task automatic clear_page(int page, int n);
    for (int a = 0; a < n; a++) for (int s = 0; s < 4; s++) wr_instr(page, s, a, INSTR_NOP);
  endtask

  task automatic wr_cfg(int page, int b, int ls, int le, int l, int it);
    @(negedge clk);
    cfg_we = 1; cfg_page = 4'(page);
    cfg_wdata = '{base: 8'(b), loop_start: 8'(ls), loop_end: 8'(le), last: 8'(l), iters: 16'(it)};
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic host_write(int a, data_t d);
    @(negedge clk); host_req = 1; host_we = 1; host_addr = 14'(a); host_wdata = d;
    @(negedge clk); host_req = 0; host_we = 0;
  endtask

  task automatic host_read(int a, output data_t d);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = 14'(a);
    @(negedge clk); host_req = 0;
    d = host_rdata;
  endtask

  task automatic expect_mem(int a, data_t e, string what);
    data_t d;
    host_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL %s mem[%h]=%h exp %h", what, a, d, e); end
  endtask

  // Kernel "pair sum" on one page, II = 5. Slot 0 holds the index i, slot 1
  // issues loads and the store address, slot 2 computes, slot 3 gives the
  // store data. Prologue at 0, kernel 1..5, epilogue 6.
  task automatic load_pair_sum(int page, int a_base, int b_base, int c_base, int mark);
    clear_page(page, 7);
    wr_instr(page, 0, 0, mk(OP_PASS, SRC_IMM, SRC_ZERO, 0));                   // i = 0
    wr_instr(page, 2, 0, mk(OP_PASS, SRC_ZERO, SRC_ZERO, 0, 1, 1, 0));         // r1 = 0 (s[-1])
    wr_instr(page, 1, 1, mk(OP_LD, SRC_N, SRC_IMM, a_base));                   // ld A[i]
    wr_instr(page, 1, 2, mk(OP_LD, SRC_N, SRC_IMM, b_base));                   // ld B[i]
    wr_instr(page, 2, 2, mk(OP_PASS, SRC_MEM));                                // A[i]
    wr_instr(page, 2, 3, mk(OP_ADD, SRC_SELF, SRC_MEM, 0, 1, 0, 0));           // s = A+B, r0 = s
    wr_instr(page, 2, 4, mk(OP_ADD, SRC_SELF, SRC_RF, 0, 0, 0, 1));            // s + r1 (previous s)
    wr_instr(page, 3, 5, mk(OP_ST_DATA, SRC_N));                               // data
    wr_instr(page, 1, 5, mk(OP_ST_ADDR, SRC_N, SRC_IMM, c_base));              // C[i]
    wr_instr(page, 0, 5, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));                    // i++
    wr_instr(page, 1, 6, mk(OP_ST_DATA, SRC_N));                               // epilogue: store i
    wr_instr(page, 2, 6, mk(OP_ST_ADDR, SRC_ZERO, SRC_IMM, mark));
  endtask

  // Two-page kernel, II = 4: page pa (west) loads X[i] and multiplies by 3,
  // page pb (east) adds 5 to its west neighbour and stores D[i].
  task automatic load_scale_pair(int pa, int pb, int x_base, int d_base);
    clear_page(pa, 5); clear_page(pb, 5);
    wr_instr(pa, 0, 0, mk(OP_PASS, SRC_IMM, SRC_ZERO, 0));
    wr_instr(pb, 0, 0, mk(OP_PASS, SRC_IMM, SRC_ZERO, 0));
    wr_instr(pa, 1, 1, mk(OP_LD, SRC_N, SRC_IMM, x_base));
    wr_instr(pa, 2, 2, mk(OP_MUL, SRC_MEM, SRC_IMM, 3));
    wr_instr(pb, 2, 3, mk(OP_ADD, SRC_W, SRC_IMM, 5));                         // cross-page link
    wr_instr(pb, 3, 4, mk(OP_ST_DATA, SRC_N));
    wr_instr(pb, 1, 4, mk(OP_ST_ADDR, SRC_N, SRC_IMM, d_base));
    wr_instr(pa, 0, 4, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));
    wr_instr(pb, 0, 4, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_load = 0, n_store = 0, n_rotate = 0, n_concurrent = 0, n_xpage = 0, n_bus_err = 0;
  int n_lockstep = 0, n_done = 0;
  int run_len [NUM_PAGES];
  logic [NUM_PAGES-1:0] busy_q = '0;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NUM_PAGES; p++) begin
      if (dut.dm_en[p] && !dut.dm_we[p]) n_load++;
      if (dut.dm_en[p] &&  dut.dm_we[p]) n_store++;
      if (dut.page_rotate[p]) n_rotate++;
      if (busy[p]) run_len[p]++;
      if (busy_q[p] && !busy[p] && done[p]) n_done++;
    end
    // threads 1, 2 and 3 on the array in the same cycle
    if (busy[0] && busy[12] && busy[2]) n_concurrent++;
    if (busy[2] != busy[3]) begin failures++; $display("FAIL pages 2/3 out of lock-step"); end
    else if (busy[2]) n_lockstep++;
    // PE (2, 3) reads its west neighbour on another page
    if (busy[3] && dut.page_instr[3][2].op == OP_ADD && dut.page_instr[3][2].src_a == SRC_W) n_xpage++;
    busy_q <= busy;
  end

  // ---------------------------------------------------------------- test
  localparam int N1 = 12, N2 = 9, N3 = 10;
  data_t A1 [N1], B1 [N1], A2 [N2], B2 [N2], X3 [N3];

  initial begin
    data_t s, sp;
    imem_wdata = INSTR_NOP; cfg_wdata = '0;
    foreach (run_len[p]) run_len[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // data buffers (the DMA's job)
    for (int i = 0; i < N1; i++) begin
      A1[i] = $urandom_range(0, 1 << 20); B1[i] = $urandom_range(0, 1 << 20);
      host_write(12'h100 + i, A1[i]); host_write(12'h200 + i, B1[i]);
    end
    for (int i = 0; i < N2; i++) begin
      A2[i] = $urandom; B2[i] = $urandom;
      host_write(12'h400 + i, A2[i]); host_write(12'h500 + i, B2[i]);
    end
    for (int i = 0; i < N3; i++) begin
      X3[i] = $urandom_range(0, 100000); host_write(12'h700 + i, X3[i]);
    end
    host_write(12'h300 + N1, 0);                                               // guard word

    // programs and windows
    load_pair_sum(0, 12'h100, 12'h200, 12'h300, 12'h3F0);
    load_pair_sum(12, 12'h400, 12'h500, 12'h600, 12'h6F0);
    load_scale_pair(2, 3, 12'h700, 12'h780);
    wr_cfg(0, 0, 1, 5, 6, N1);
    wr_cfg(12, 0, 1, 5, 6, N2);
    wr_cfg(2, 0, 1, 4, 4, N3);
    wr_cfg(3, 0, 1, 4, 4, N3);
    clear_page(7, 2);
    wr_instr(7, 0, 1, mk(OP_ST_ADDR, SRC_ZERO, SRC_IMM, 12'h7F0));             // no data half
    wr_cfg(7, 0, 1, 1, 1, 1);

    checks++; if (busy != '0 || done != '0 || bus_error != '0) begin failures++; $display("FAIL idle state after reset"); end

    // thread 1 first, threads 2 and 3 while it runs
    @(negedge clk); start_mask = 16'h0001;
    @(negedge clk); start_mask = '0;
    repeat (7) @(negedge clk);
    start_mask = 16'h100C;                                                     // pages 2, 3 and 12
    @(negedge clk); start_mask = '0;
    repeat (3) @(negedge clk);
    start_mask = 16'h0080;                                                     // page 7
    @(negedge clk); start_mask = '0;

    while (busy != '0) @(negedge clk);
    @(negedge clk);

    // completion flags and run lengths: prologue + II * N + epilogue
    checks++; if (done != 16'h108D) begin failures++; $display("FAIL done=%h", done); end
    checks++; if (run_len[0]  != 1 + 5 * N1 + 1) begin failures++; $display("FAIL page 0 ran %0d cycles", run_len[0]); end
    checks++; if (run_len[12] != 1 + 5 * N2 + 1) begin failures++; $display("FAIL page 12 ran %0d cycles", run_len[12]); end
    checks++; if (run_len[2]  != 1 + 4 * N3)     begin failures++; $display("FAIL page 2 ran %0d cycles", run_len[2]); end
    checks++; if (run_len[3]  != run_len[2])     begin failures++; $display("FAIL page 3 ran %0d cycles", run_len[3]); end
    checks++; if (bus_error != 16'h0080) begin failures++; $display("FAIL bus_error=%h", bus_error); end
    if (bus_error[7]) n_bus_err++;

    // results
    sp = 0;
    for (int i = 0; i < N1; i++) begin s = A1[i] + B1[i]; expect_mem(12'h300 + i, s + sp, "thread 1"); sp = s; end
    expect_mem(12'h3F0, N1, "thread 1 epilogue");
    sp = 0;
    for (int i = 0; i < N2; i++) begin s = A2[i] + B2[i]; expect_mem(12'h600 + i, s + sp, "thread 2"); sp = s; end
    expect_mem(12'h6F0, N2, "thread 2 epilogue");
    for (int i = 0; i < N3; i++) expect_mem(12'h780 + i, 3 * X3[i] + 5, "thread 3");
    expect_mem(12'h300 + N1, 0, "no store past the end");

    // every mechanism must have happened
    checks++; if (n_load != 2 * N1 + 2 * N2 + N3) begin failures++; $display("FAIL loads %0d", n_load); end
    checks++; if (n_store != N1 + 1 + N2 + 1 + N3) begin failures++; $display("FAIL stores %0d", n_store); end
    checks++; if (n_rotate != N1 + N2 + 2 * N3 + 1) begin failures++; $display("FAIL rotations %0d", n_rotate); end
    checks++; if (n_concurrent == 0) begin failures++; $display("FAIL threads never overlapped"); end
    checks++; if (n_xpage != N3) begin failures++; $display("FAIL cross-page transfers %0d", n_xpage); end
    checks++; if (n_lockstep == 0) begin failures++; $display("FAIL no lock-step run"); end
    checks++; if (n_bus_err == 0) begin failures++; $display("FAIL bus rule break not flagged"); end
    checks++; if (n_done != 5) begin failures++; $display("FAIL completions %0d", n_done); end
    $display("mechanisms: loads=%0d stores=%0d loop-backs/rotations=%0d concurrent-cycles=%0d cross-page=%0d lock-step-cycles=%0d bus-errors=%0d completions=%0d",
             n_load, n_store, n_rotate, n_concurrent, n_xpage, n_lockstep, n_bus_err, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
