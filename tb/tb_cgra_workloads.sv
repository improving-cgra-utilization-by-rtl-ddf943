// tb_cgra_workloads -- three benchmark kernels sharing the 8x8 paged CGRA.
//
// Hand-scheduled loop kernels, each on its own pages, run at the same time
// with the array at its default size:
//   First Difference       (page 0)       x[i] = y[i+1] - y[i],          N = 40
//   Tri-Diagonal Elim.     (page 5)       x[i] = z[i] * (y[i] - x[i-1]), i = 1..N-1
//                                         (loop-carried value kept in an output
//                                         register)
//   Matrix-matrix multiply (pages 8 + 9)  px[j][i] += vy[k][i] * cx[j][k]
//                                         the CGRA runs the i loop; the host
//                                         runs j and k, passing the row bases
//                                         and cx[j][k] in a parameter block
//                                         that the prologue loads.
// Pages 8 and 9 run in lock-step and exchange the product over the mesh.
// Results are compared with the same computation done here; each launch's
// length is checked against prologue + II * N cycles.
module tb_cgra_workloads;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  function automatic pe_instr_t mk(op_e op, src_e a = SRC_ZERO, src_e b = SRC_ZERO, int imm = 0);
    pe_instr_t i = INSTR_NOP;
    i.op = op; i.src_a = a; i.src_b = b; i.imm = IMM_W'(imm);
    return i;
  endfunction

  // host-side tasks share the host ports; a semaphore keeps them apart
  semaphore host = new(1);

  task automatic wr_instr(int page, int slot, int addr, pe_instr_t i);
    host.get();
    @(negedge clk);
    imem_we = 1; imem_page = 4'(page); imem_slot = 2'(slot); imem_addr = 6'(addr); imem_wdata = i;
    @(negedge clk); imem_we = 0;
    host.put();
  endtask

  task automatic clear_page(int page, int n);
    for (int a = 0; a < n; a++) for (int s = 0; s < 4; s++) wr_instr(page, s, a, INSTR_NOP);
  endtask

  task automatic wr_cfg(int page, int b, int ls, int le, int l, int it);
    host.get();
    @(negedge clk);
    cfg_we = 1; cfg_page = 4'(page);
    cfg_wdata = '{base: 8'(b), loop_start: 8'(ls), loop_end: 8'(le), last: 8'(l), iters: 16'(it)};
    @(negedge clk); cfg_we = 0;
    host.put();
  endtask

  task automatic host_write(int a, data_t d);
    host.get();
    @(negedge clk); host_req = 1; host_we = 1; host_addr = 14'(a); host_wdata = d;
    @(negedge clk); host_req = 0; host_we = 0;
    host.put();
  endtask

  task automatic host_read(int a, output data_t d);
    host.get();
    @(negedge clk); host_req = 1; host_we = 0; host_addr = 14'(a);
    @(negedge clk); host_req = 0;
    d = host_rdata;
    host.put();
  endtask

  // start pages together and wait for them; returns the run length
  task automatic launch(logic [NUM_PAGES-1:0] m, output int cycles);
    host.get();
    @(negedge clk); start_mask = m;
    @(negedge clk); start_mask = '0;
    host.put();
    cycles = 1;
    while ((busy & m) != '0) begin @(negedge clk); cycles++; end
    cycles--;
  endtask

  task automatic expect_eq(data_t got, data_t e, string what);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s: %h exp %h", what, got, e); end
  endtask

  // -------------------------------------------------------------- data
  localparam int FD_N = 40, FD_Y = 'h100, FD_X = 'h200;
  localparam int TD_N = 32, TD_X = 'h300, TD_Y = 'h380, TD_Z = 'h400;
  localparam int MM_N = 6, MM_PX = 'h1000, MM_VY = 'h1100, MM_CX = 'h1200, MM_P = 'h7F0;

  data_t fd_y [FD_N + 1];
  data_t td_x [TD_N], td_y [TD_N], td_z [TD_N];
  data_t px [MM_N][MM_N], vy [MM_N][MM_N], cx [MM_N][MM_N];

  int concurrent = 0;
  always @(posedge clk) if (busy[0] && busy[5] && busy[8]) concurrent++;
  always @(posedge clk) if (rst_n && busy[8] != busy[9]) begin failures++; $display("FAIL pages 8/9 out of lock-step"); end

  // -------------------------------------------------- kernel programs
  // First Difference, page 0, prologue 1, II = 4.
  task automatic load_first_dif();
    clear_page(0, 5);
    wr_instr(0, 0, 0, mk(OP_PASS, SRC_IMM, SRC_ZERO, 0));                // i = 0
    wr_instr(0, 1, 1, mk(OP_LD, SRC_N, SRC_IMM, FD_Y));                 // y[i]
    wr_instr(0, 1, 2, mk(OP_LD, SRC_N, SRC_IMM, FD_Y + 1));             // y[i+1]
    wr_instr(0, 2, 2, mk(OP_PASS, SRC_MEM));
    wr_instr(0, 2, 3, mk(OP_SUB, SRC_MEM, SRC_SELF));                   // y[i+1] - y[i]
    wr_instr(0, 3, 4, mk(OP_ST_DATA, SRC_N));
    wr_instr(0, 1, 4, mk(OP_ST_ADDR, SRC_N, SRC_IMM, FD_X));
    wr_instr(0, 0, 4, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));
    wr_cfg(0, 0, 1, 4, 4, FD_N);
  endtask

  // Tri-Diagonal Elimination, page 5, prologue 2, II = 4.
  task automatic load_tde();
    clear_page(5, 6);
    wr_instr(5, 0, 0, mk(OP_PASS, SRC_IMM, SRC_ZERO, 1));                // i = 1
    wr_instr(5, 1, 0, mk(OP_LD, SRC_ZERO, SRC_IMM, TD_X));              // x[0]
    wr_instr(5, 2, 1, mk(OP_PASS, SRC_MEM));                            // carried x
    wr_instr(5, 1, 2, mk(OP_LD, SRC_N, SRC_IMM, TD_Y));                 // y[i]
    wr_instr(5, 1, 3, mk(OP_LD, SRC_N, SRC_IMM, TD_Z));                 // z[i]
    wr_instr(5, 3, 3, mk(OP_SUB, SRC_MEM, SRC_N));                      // y[i] - x[i-1]
    wr_instr(5, 2, 4, mk(OP_MUL, SRC_MEM, SRC_S));                      // x[i]
    wr_instr(5, 3, 5, mk(OP_ST_DATA, SRC_N));
    wr_instr(5, 1, 5, mk(OP_ST_ADDR, SRC_N, SRC_IMM, TD_X));
    wr_instr(5, 0, 5, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));
    wr_cfg(5, 0, 2, 5, 5, TD_N - 1);
  endtask

  // Matrix-matrix inner loop on pages 8 (column 0, rows 4-7) and 9 (column 1,
  // rows 4-7); slot s of a page is row 4+s. Prologue 4, II = 4.
  task automatic load_mm();
    clear_page(8, 8); clear_page(9, 8);
    // prologue: parameters over page 9's bus
    wr_instr(8, 0, 0, mk(OP_PASS, SRC_IMM, SRC_ZERO, 0));                // i = 0        (4,0)
    wr_instr(9, 0, 0, mk(OP_LD, SRC_ZERO, SRC_IMM, MM_P + 1));          // vy row base
    wr_instr(9, 0, 1, mk(OP_PASS, SRC_MEM));                            //              (4,1)
    wr_instr(9, 1, 1, mk(OP_LD, SRC_ZERO, SRC_IMM, MM_P + 0));          // px row base
    wr_instr(9, 1, 2, mk(OP_PASS, SRC_MEM));                            //              (5,1)
    wr_instr(9, 2, 2, mk(OP_LD, SRC_ZERO, SRC_IMM, MM_P + 2));          // cx[j][k]
    wr_instr(9, 3, 3, mk(OP_PASS, SRC_MEM));                            //              (7,1)
    // kernel
    wr_instr(8, 1, 4, mk(OP_LD, SRC_N, SRC_E));                         // px[j][i]  (page 8 bus)
    wr_instr(9, 0, 4, mk(OP_LD, SRC_W, SRC_SELF));                      // vy[k][i]  (page 9 bus)
    wr_instr(8, 2, 5, mk(OP_PASS, SRC_MEM));                            // px
    wr_instr(9, 2, 5, mk(OP_MUL, SRC_MEM, SRC_S));                      // vy * cx
    wr_instr(8, 2, 6, mk(OP_ADD, SRC_SELF, SRC_E));                     // px + product (mesh, page 9 -> 8)
    wr_instr(8, 3, 7, mk(OP_ST_DATA, SRC_N));
    wr_instr(8, 1, 7, mk(OP_ST_ADDR, SRC_N, SRC_E));
    wr_instr(8, 0, 7, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));
    wr_cfg(8, 0, 4, 7, 7, MM_N);
    wr_cfg(9, 0, 4, 7, 7, MM_N);
  endtask

  // -------------------------------------------------------------- test
  initial begin
    int cyc_fd, cyc_td, n_launch = 0;
    bit fd_ok_len = 1, td_ok_len = 1, mm_ok_len = 1;
    imem_wdata = INSTR_NOP; cfg_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i <= FD_N; i++) begin fd_y[i] = $urandom; host_write(FD_Y + i, fd_y[i]); end
    for (int i = 0; i < TD_N; i++) begin
      td_x[i] = $urandom_range(0, 1000); td_y[i] = $urandom; td_z[i] = $urandom_range(0, 7);
      host_write(TD_X + i, td_x[i]); host_write(TD_Y + i, td_y[i]); host_write(TD_Z + i, td_z[i]);
    end
    for (int a = 0; a < MM_N; a++) for (int b = 0; b < MM_N; b++) begin
      px[a][b] = $urandom_range(0, 1 << 16); vy[a][b] = $urandom_range(0, 1 << 12); cx[a][b] = $urandom_range(0, 1 << 12);
      host_write(MM_PX + a * MM_N + b, px[a][b]);
      host_write(MM_VY + a * MM_N + b, vy[a][b]);
      host_write(MM_CX + a * MM_N + b, cx[a][b]);
    end

    load_first_dif();
    load_tde();
    load_mm();

    fork
      // thread running matrix multiply, one launch per (k, j)
      begin
        for (int k = 0; k < MM_N; k++) for (int j = 0; j < MM_N; j++) begin
          int cyc;
          data_t c;
          host_read(MM_CX + j * MM_N + k, c);
          host_write(MM_P + 0, MM_PX + j * MM_N);
          host_write(MM_P + 1, MM_VY + k * MM_N);
          host_write(MM_P + 2, c);
          launch(16'h0300, cyc);
          n_launch++;
          if (cyc != 4 + 4 * MM_N) mm_ok_len = 0;
        end
      end
      // the two single-page kernels start while the first launches run
      begin
        repeat (30) @(negedge clk);
        fork
          launch(16'h0001, cyc_fd);
          launch(16'h0020, cyc_td);
        join
        if (cyc_fd != 1 + 4 * FD_N) fd_ok_len = 0;
        if (cyc_td != 2 + 4 * (TD_N - 1)) td_ok_len = 0;
      end
    join

    checks++; if (!fd_ok_len) begin failures++; $display("FAIL first-difference run length %0d", cyc_fd); end
    checks++; if (!td_ok_len) begin failures++; $display("FAIL TDE run length %0d", cyc_td); end
    checks++; if (!mm_ok_len) begin failures++; $display("FAIL matrix launch length"); end
    checks++; if (concurrent == 0) begin failures++; $display("FAIL kernels never overlapped"); end
    checks++; if (bus_error != '0) begin failures++; $display("FAIL bus_error=%h", bus_error); end

    // results
    for (int i = 0; i < FD_N; i++) begin
      data_t d; host_read(FD_X + i, d); expect_eq(d, fd_y[i + 1] - fd_y[i], "first difference");
    end
    for (int i = 1; i < TD_N; i++) td_x[i] = td_z[i] * (td_y[i] - td_x[i - 1]);
    for (int i = 1; i < TD_N; i++) begin
      data_t d; host_read(TD_X + i, d); expect_eq(d, td_x[i], "tri-diagonal elimination");
    end
    for (int k = 0; k < MM_N; k++) for (int a = 0; a < MM_N; a++) for (int i = 0; i < MM_N; i++)
      px[a][i] += vy[k][i] * cx[a][k];
    for (int a = 0; a < MM_N; a++) for (int i = 0; i < MM_N; i++) begin
      data_t d; host_read(MM_PX + a * MM_N + i, d); expect_eq(d, px[a][i], "matrix multiply");
    end
    $display("launches=%0d overlapped cycles=%0d first-dif %0d cycles, TDE %0d cycles", n_launch, concurrent, cyc_fd, cyc_td);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
