// tb_cgra_dmem -- self-checking test of the multi-port data memory.
// Random reads and writes on all ports against a shadow array; read data is
// checked one cycle after the request; same-address writes: higher port wins.
module tb_cgra_dmem;
  import cgra_pkg::*;
  localparam int WORDS = 256, NP = 3, AW = 8;

  logic clk = 0;
  logic [NP-1:0] en, we;
  logic [AW-1:0] addr [NP];
  data_t wdata [NP], rdata [NP];
  data_t shadow [WORDS];
  data_t exp_rd [NP];
  logic [NP-1:0] rd_pend;
  int checks = 0, failures = 0;

  cgra_dmem #(.W(DATA_W), .WORDS(WORDS), .NPORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0; we = '0;
    foreach (addr[p]) begin addr[p] = 0; wdata[p] = 0; end
    // initialise through port 0
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); en = 1; we = 1; addr[0] = AW'(a); wdata[0] = $urandom; shadow[a] = wdata[0];
    end
    @(negedge clk); en = 0; we = 0; rd_pend = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) if (rd_pend[p]) begin
        checks++;
        if (rdata[p] !== exp_rd[p]) begin failures++; $display("FAIL port %0d rd=%h exp=%h", p, rdata[p], exp_rd[p]); end
      end
      rd_pend = '0;
      for (int p = 0; p < NP; p++) begin
        en[p] = $urandom_range(0, 1); we[p] = $urandom_range(0, 1);
        addr[p] = (n % 5 == 0) ? AW'(3) : AW'($urandom); wdata[p] = $urandom;
        if (en[p] && !we[p]) begin rd_pend[p] = 1; exp_rd[p] = shadow[addr[p]]; end
      end
      for (int p = 0; p < NP; p++) if (en[p] && we[p]) shadow[addr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
