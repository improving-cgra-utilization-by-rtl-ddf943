// tb_cgra_page_bus -- self-checking test of a page's load/store bus.
// Directed cases: idle, load, two-PE store, each rule break (two addresses,
// two data, address without data, data without address) and the sticky error.
module tb_cgra_page_bus;
  import cgra_pkg::*;
  localparam int P = 4, AW = 14;

  logic clk = 0, rst_n = 0;
  pe_mem_req_t [P-1:0] req;
  logic mem_en, mem_we, err_now, err;
  logic [AW-1:0] mem_addr;
  data_t mem_wdata;
  int checks = 0, failures = 0;

  cgra_page_bus #(.PAGE_PES(P), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bus(bit en, bit we, int addr, data_t wd, bit e, string what);
    #1;
    checks++;
    if (mem_en !== en || err_now !== e || (en && (mem_we !== we || int'(mem_addr) != addr))
        || (en && we && mem_wdata !== wd)) begin
      failures++;
      $display("FAIL %s: en=%b we=%b addr=%h wd=%h err=%b", what, mem_en, mem_we, mem_addr, mem_wdata, err_now);
    end
  endtask

  function automatic pe_mem_req_t ld(int a);
    pe_mem_req_t r = '0; r.addr_vld = 1; r.addr = data_t'(a); return r;
  endfunction
  function automatic pe_mem_req_t sta(int a);
    pe_mem_req_t r = '0; r.addr_vld = 1; r.is_store = 1; r.addr = data_t'(a); return r;
  endfunction
  function automatic pe_mem_req_t std(data_t d);
    pe_mem_req_t r = '0; r.data_vld = 1; r.data = d; return r;
  endfunction

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); req = '0;                            expect_bus(0, 0, 0, 0, 0, "idle");
    @(negedge clk); req = '0; req[2] = ld(32'h1_0123);   expect_bus(1, 0, 'h0123, 0, 0, "load, address truncated");
    @(negedge clk); req = '0; req[3] = sta(77); req[0] = std(32'hCAFE); expect_bus(1, 1, 77, 32'hCAFE, 0, "two-PE store");
    @(posedge clk); #1 checks++; if (err) begin failures++; $display("FAIL sticky err set early"); end
    @(negedge clk); req = '0; req[1] = ld(5); req[3] = ld(9); expect_bus(1, 0, 5, 0, 1, "two addresses");
    @(posedge clk); #1 checks++; if (!err) begin failures++; $display("FAIL sticky err"); end
    @(negedge clk); req = '0; req[1] = sta(5);              expect_bus(0, 0, 0, 0, 1, "address without data");
    @(negedge clk); req = '0; req[2] = std(1);              expect_bus(0, 0, 0, 0, 1, "data without address");
    @(negedge clk); req = '0; req[0] = sta(6); req[1] = std(1); req[2] = std(2); expect_bus(1, 1, 6, 1, 1, "two data");
    @(negedge clk); req = '0; req[2] = ld(3); req[1] = std(4); expect_bus(1, 0, 3, 0, 1, "data with a load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
