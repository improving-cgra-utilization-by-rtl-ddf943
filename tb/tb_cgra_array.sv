// tb_cgra_array -- self-checking test of the PE grid and mesh.
// 4x3 array with 2-PE pages (6 pages). Cycle 1: every PE loads a unique value
// (row*16+col+1). Cycle 2: every PE adds its N and S neighbours; cycle 3 its
// E and W neighbours onto itself. Results are compared with a model that
// treats off-array links as zero. Then one page is disabled and must hold,
// and each page's load data and bus requests are checked to reach the right
// PEs.
module tb_cgra_array;
  import cgra_pkg::*;
  localparam int R = 4, C = 3, PP = 2, NPG = (R / PP) * C;

  logic clk = 0, rst_n = 0;
  pe_instr_t [PP-1:0] page_instr [NPG];
  logic [NPG-1:0] page_en = '0, page_rotate = '0;
  data_t page_rdata [NPG];
  pe_mem_req_t [PP-1:0] page_req [NPG];
  data_t pe_out [R][C];
  data_t m [R][C], nm [R][C];
  int checks = 0, failures = 0;

  cgra_array #(.ROWS(R), .COLS(C), .PAGE_PES(PP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pe_instr_t mk(op_e op, src_e a, src_e b, int imm = 0);
    pe_instr_t i = INSTR_NOP;
    i.op = op; i.src_a = a; i.src_b = b; i.imm = IMM_W'(imm);
    return i;
  endfunction

  function automatic data_t g(int r, int c);
    return (r < 0 || r >= R || c < 0 || c >= C) ? 0 : m[r][c];
  endfunction

  task automatic compare(string what);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      checks++;
      if (pe_out[r][c] !== m[r][c]) begin failures++; $display("FAIL %s PE(%0d,%0d)=%h exp %h", what, r, c, pe_out[r][c], m[r][c]); end
    end
  endtask

  initial begin
    foreach (page_instr[p]) begin page_instr[p] = '{default: INSTR_NOP}; page_rdata[p] = data_t'(32'h1000 + p); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // unique values through the immediate; the slot/page mapping is exercised here
    @(negedge clk);
    page_en = '1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      page_instr[(r / PP) * C + c][r % PP] = mk(OP_PASS, SRC_IMM, SRC_ZERO, r * 16 + c + 1);
      m[r][c] = data_t'(r * 16 + c + 1);
    end
    @(posedge clk); #1 compare("imm");
    @(negedge clk);
    foreach (page_instr[p]) page_instr[p] = '{default: mk(OP_ADD, SRC_N, SRC_S)};
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) nm[r][c] = g(r - 1, c) + g(r + 1, c);
    m = nm;
    @(posedge clk); #1 compare("N+S");
    @(negedge clk);
    foreach (page_instr[p]) page_instr[p] = '{default: mk(OP_ADD, SRC_E, SRC_W)};
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) nm[r][c] = g(r, c + 1) + g(r, c - 1);
    m = nm;
    @(posedge clk); #1 compare("E+W");
    // page 4 = rows 2-3, column 1 disabled: holds; others take their page's load data
    @(negedge clk);
    page_en = '1; page_en[4] = 1'b0;
    foreach (page_instr[p]) page_instr[p] = '{default: mk(OP_PASS, SRC_MEM, SRC_ZERO)};
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
      if ((r / PP) * C + c != 4) m[r][c] = data_t'(32'h1000 + (r / PP) * C + c);
    @(posedge clk); #1 compare("page load data / disabled page");
    // requests: page 5 slot 1 (PE 3,2) issues a load at W + 8
    @(negedge clk);
    foreach (page_instr[p]) page_instr[p] = '{default: INSTR_NOP};
    page_instr[5][1] = mk(OP_LD, SRC_W, SRC_IMM, 8);
    #1;
    for (int p = 0; p < NPG; p++) for (int s = 0; s < PP; s++) begin
      checks++;
      if (page_req[p][s].addr_vld !== (p == 5 && s == 1)) begin failures++; $display("FAIL req page %0d slot %0d", p, s); end
    end
    checks++; if (page_req[5][1].addr !== m[3][1] + 8) begin failures++; $display("FAIL req address"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
