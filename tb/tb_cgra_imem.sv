// tb_cgra_imem -- self-checking test of a page's instruction memory.
// Writes random instructions slot by slot, then reads every word back and
// compares all slots with a shadow copy.
module tb_cgra_imem;
  import cgra_pkg::*;
  localparam int P = 4, D = 64;

  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [1:0] wslot = 0;
  pe_instr_t wdata;
  pe_instr_t [P-1:0] rdata;
  pe_instr_t shadow [D][P];
  int checks = 0, failures = 0;

  cgra_imem #(.PAGE_PES(P), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = INSTR_NOP;
    for (int a = 0; a < D; a++)
      for (int s = 0; s < P; s++) begin
        pe_instr_t v;
        v = pe_instr_t'({$urandom, $urandom});
        @(negedge clk); we = 1; waddr = 6'(a); wslot = 2'(s); wdata = v; shadow[a][s] = v;
      end
    // overwrite one slot and make sure neighbours are untouched
    @(negedge clk); waddr = 7; wslot = 2; wdata = INSTR_NOP; shadow[7][2] = INSTR_NOP;
    @(negedge clk); we = 0;
    for (int a = 0; a < D; a++) begin
      raddr = 6'(a); #1;
      for (int s = 0; s < P; s++) begin
        checks++;
        if (rdata[s] !== shadow[a][s]) begin failures++; $display("FAIL addr %0d slot %0d", a, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
