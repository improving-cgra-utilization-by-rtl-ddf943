// tb_cgra_threads -- many threads competing for the pages of the default
// 8x8 CGRA (16 pages of 4 PEs).
//
// A host-side scheduler keeps a queue of 32 threads. Each thread is either a
// one-page kernel (C[i] = s[i] + s[i-1], s[i] = A[i] + B[i], II 5) or a
// two-page kernel (D[i] = 3*X[i] + 5, II 4, pages side by side in one page
// row, product passed over the mesh), with its own data region and length.
// Whenever enough pages are free, the next thread's image is placed on
// whatever pages are free -- the same image works on any page, which is what
// the uniform mesh buys -- and started; finished pages are released. Threads
// that find no free pages wait, as in a paging system. At the end every
// result word is checked, and the test counts the peak number of threads
// running at once, the waits and how many different pages each kernel used.
// It also measures useful utilization over the whole run: PE-cycles with a
// non-NOP instruction on a running page, divided by the PE-cycles of all
// running pages (active PEs over allotted PEs, both summed over cycles).
module tb_cgra_threads;
  import cgra_pkg::*;

  localparam int NUM_PAGES = 16, COLS = 8, NT = 32, REGION = 128;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pe_instr_t mk(op_e op, src_e a = SRC_ZERO, src_e b = SRC_ZERO, int imm = 0,
                                   bit we = 0, int wa = 0, int ra = 0);
    pe_instr_t i = INSTR_NOP;
    i.op = op; i.src_a = a; i.src_b = b; i.imm = IMM_W'(imm);
    i.rf_we = we; i.rf_waddr = RF_AW'(wa); i.rf_raddr = RF_AW'(ra);
    return i;
  endfunction

  task automatic wr_instr(int page, int slot, int addr, pe_instr_t i);
    imem_we = 1; imem_page = 4'(page); imem_slot = 2'(slot); imem_addr = 6'(addr); imem_wdata = i;
    @(negedge clk); imem_we = 0;
  endtask

  // image kind last loaded on each page (-1: unknown, 3: blank); a blank page
  // or one that already holds the same kernel only needs the thread-specific
  // words written
  int page_kind [16];

  task automatic clear_page(int page, int n, int kind);
    int old = page_kind[page];
    page_kind[page] = kind;
    if (old == kind || old == 3) return;
    for (int a = 0; a < n; a++) for (int s = 0; s < 4; s++) wr_instr(page, s, a, INSTR_NOP);
  endtask

  task automatic wr_cfg(int page, int b, int ls, int le, int l, int it);
    cfg_we = 1; cfg_page = 4'(page);
    cfg_wdata = '{base: 8'(b), loop_start: 8'(ls), loop_end: 8'(le), last: 8'(l), iters: 16'(it)};
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic host_write(int a, data_t d);
    host_req = 1; host_we = 1; host_addr = 14'(a); host_wdata = d;
    @(negedge clk); host_req = 0; host_we = 0;
  endtask

  task automatic host_read(int a, output data_t d);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = 14'(a);
    @(negedge clk); host_req = 0;
    d = host_rdata;
  endtask

  // One-page image. The index register starts at the region base (twice the
  // immediate, so regions reach past the 12-bit immediate range); A at +0,
  // B at +42, C at +84, and the final index is stored at +127.
  task automatic load_pair_sum(int page, int r, int n);
    clear_page(page, 7, 0);
    wr_instr(page, 0, 0, mk(OP_ADD, SRC_IMM, SRC_IMM, r / 2));
    wr_instr(page, 2, 0, mk(OP_PASS, SRC_ZERO, SRC_ZERO, 0, 1, 1, 0));
    wr_instr(page, 1, 1, mk(OP_LD, SRC_N, SRC_IMM, 0));
    wr_instr(page, 1, 2, mk(OP_LD, SRC_N, SRC_IMM, 42));
    wr_instr(page, 2, 2, mk(OP_PASS, SRC_MEM));
    wr_instr(page, 2, 3, mk(OP_ADD, SRC_SELF, SRC_MEM, 0, 1, 0, 0));
    wr_instr(page, 2, 4, mk(OP_ADD, SRC_SELF, SRC_RF, 0, 0, 0, 1));
    wr_instr(page, 3, 5, mk(OP_ST_DATA, SRC_N));
    wr_instr(page, 1, 5, mk(OP_ST_ADDR, SRC_N, SRC_IMM, 84));
    wr_instr(page, 0, 5, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));
    wr_instr(page, 0, 6, mk(OP_ST_DATA, SRC_SELF));
    wr_instr(page, 1, 6, mk(OP_ST_ADDR, SRC_N, SRC_IMM, 127 - n));
    wr_cfg(page, 0, 1, 5, 6, n);
  endtask

  // two-page image on pa (west) and pa+1 (east); X at +0, D at +64
  task automatic load_scale_pair(int pa, int r, int n);
    int pb = pa + 1;
    clear_page(pa, 5, 1); clear_page(pb, 5, 2);
    wr_instr(pa, 0, 0, mk(OP_ADD, SRC_IMM, SRC_IMM, r / 2));
    wr_instr(pb, 0, 0, mk(OP_ADD, SRC_IMM, SRC_IMM, r / 2));
    wr_instr(pa, 1, 1, mk(OP_LD, SRC_N, SRC_IMM, 0));
    wr_instr(pa, 2, 2, mk(OP_MUL, SRC_MEM, SRC_IMM, 3));
    wr_instr(pb, 2, 3, mk(OP_ADD, SRC_W, SRC_IMM, 5));
    wr_instr(pb, 3, 4, mk(OP_ST_DATA, SRC_N));
    wr_instr(pb, 1, 4, mk(OP_ST_ADDR, SRC_N, SRC_IMM, 64));
    wr_instr(pa, 0, 4, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));
    wr_instr(pb, 0, 4, mk(OP_ADD, SRC_SELF, SRC_IMM, 1));
    wr_cfg(pa, 0, 1, 4, 4, n);
    wr_cfg(pb, 0, 1, 4, 4, n);
  endtask

  // thread table
  bit   two_page [NT];
  int   len [NT];
  int   first_page [NT];
  data_t src_a [NT][42], src_b [NT][42];

  int owner [NUM_PAGES];          // thread on the page, -1 when free
  int peak = 0, waits = 0;
  bit used_page [2][NUM_PAGES];   // per kernel kind, pages it ran on

  // useful utilization: active PE-cycles over allotted PE-cycles
  longint active_pe_cycles = 0, allotted_pe_cycles = 0;
  always @(posedge clk)
    for (int p = 0; p < NUM_PAGES; p++)
      if (rst_n && busy[p]) begin
        allotted_pe_cycles += 4;
        for (int s = 0; s < 4; s++)
          if (dut.page_instr[p][s].op != OP_NOP) active_pe_cycles++;
      end

  function automatic int running_threads();
    int n = 0;
    for (int p = 0; p < NUM_PAGES; p++)
      if (owner[p] >= 0 && !(two_page[owner[p]] && first_page[owner[p]] != p)) n++;
    return n;
  endfunction

  // first free page (or free west page of a free east neighbour in one page row)
  function automatic int find_pages(bit two);
    for (int p = 0; p < NUM_PAGES; p++) begin
      if (!two && owner[p] < 0) return p;
      if (two && (p % COLS) != COLS - 1 && owner[p] < 0 && owner[p + 1] < 0) return p;
    end
    return -1;
  endfunction

  initial begin
    int next, finished;
    next = 0; finished = 0;
    imem_wdata = INSTR_NOP; cfg_wdata = '0;
    foreach (owner[p]) owner[p] = -1;
    foreach (page_kind[p]) page_kind[p] = -1;
    foreach (used_page[k, p]) used_page[k][p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NUM_PAGES; p++) clear_page(p, 7, 3);

    for (int t = 0; t < NT; t++) begin
      two_page[t] = (t % 2 == 1);
      len[t] = $urandom_range(32, 42);
      for (int i = 0; i < len[t]; i++) begin
        src_a[t][i] = $urandom; src_b[t][i] = $urandom;
        host_write(t * REGION + i, src_a[t][i]);
        if (!two_page[t]) host_write(t * REGION + 42 + i, src_b[t][i]);
      end
    end

    while (finished < NT) begin
      // release finished pages
      for (int p = 0; p < NUM_PAGES; p++)
        if (owner[p] >= 0 && !busy[p] && done[p]) begin
          if (!two_page[owner[p]] || first_page[owner[p]] == p) finished++;
          owner[p] = -1;
        end
      // place the next thread if it fits
      if (next < NT) begin
        int p;
        p = find_pages(two_page[next]);
        if (p < 0) begin
          waits++;
          @(negedge clk);
        end else begin
          logic [NUM_PAGES-1:0] m;
          m = '0;
          first_page[next] = p;
          owner[p] = next; m[p] = 1'b1; used_page[two_page[next]][p] = 1;
          if (two_page[next]) begin
            owner[p + 1] = next; m[p + 1] = 1'b1;
            load_scale_pair(p, next * REGION, len[next]);
          end else begin
            load_pair_sum(p, next * REGION, len[next]);
          end
          @(negedge clk); start_mask = m;
          @(negedge clk); start_mask = '0;
          next++;
        end
      end else begin
        @(negedge clk);
      end
      if (running_threads() > peak) peak = running_threads();
    end

    // results
    for (int t = 0; t < NT; t++) begin
      data_t d, s, sp;
      sp = 0;
      for (int i = 0; i < len[t]; i++) begin
        host_read(t * REGION + (two_page[t] ? 64 : 84) + i, d);
        checks++;
        if (two_page[t]) begin
          if (d !== 3 * src_a[t][i] + 5) begin failures++; $display("FAIL thread %0d D[%0d]", t, i); end
        end else begin
          s = src_a[t][i] + src_b[t][i];
          if (d !== s + sp) begin failures++; $display("FAIL thread %0d C[%0d]", t, i); end
          sp = s;
        end
      end
      if (!two_page[t]) begin
        host_read(t * REGION + 127, d);
        checks++; if (d !== data_t'(t * REGION + len[t])) begin failures++; $display("FAIL thread %0d final index", t); end
      end
    end
    checks++; if (bus_error != '0) begin failures++; $display("FAIL bus_error=%h", bus_error); end
    begin
      int n1, n2;
      n1 = 0; n2 = 0;
      foreach (used_page[0][p]) begin n1 += used_page[0][p]; n2 += used_page[1][p]; end
      checks++; if (peak < 8) begin failures++; $display("FAIL only %0d threads at once", peak); end
      checks++; if (waits == 0) begin failures++; $display("FAIL no thread ever waited for pages"); end
      checks++; if (n1 < 4 || n2 < 2) begin failures++; $display("FAIL images not relocated (%0d, %0d pages)", n1, n2); end
      // expected from the schedules: the one-page kernel runs 2 + 5*len
      // cycles with 2 + 8*len + 2 non-NOP slots; the two-page kernel runs
      // 1 + 4*len cycles on each of its pages with 2 + 7*len non-NOP slots
      begin
        longint exp_act, exp_all;
        exp_act = 0; exp_all = 0;
        for (int t = 0; t < NT; t++)
          if (two_page[t]) begin
            exp_act += 2 + 7 * len[t]; exp_all += 2 * 4 * (1 + 4 * len[t]);
          end else begin
            exp_act += 4 + 8 * len[t]; exp_all += 4 * (2 + 5 * len[t]);
          end
        checks++;
        if (active_pe_cycles != exp_act || allotted_pe_cycles != exp_all) begin
          failures++;
          $display("FAIL PE-cycles active %0d/%0d allotted %0d/%0d", active_pe_cycles, exp_act,
                   allotted_pe_cycles, exp_all);
        end
      end
      $display("threads=%0d peak concurrent=%0d wait cycles=%0d pages used: one-page kernel %0d, two-page kernel %0d",
               NT, peak, waits, n1, n2);
      $display("useful utilization %0d.%0d%% (%0d of %0d PE-cycles)",
               active_pe_cycles * 100 / allotted_pe_cycles, (active_pe_cycles * 1000 / allotted_pe_cycles) % 10,
               active_pe_cycles, allotted_pe_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
