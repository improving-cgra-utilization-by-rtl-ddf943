// tb_cgra_page_seq -- self-checking test of the page instruction counter.
// Checks the pc sequence prologue / kernel x iters / epilogue cycle by cycle,
// the rotate pulses, the run length in cycles, done, restart, iters = 0.
module tb_cgra_page_seq;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0, cfg_we = 0, start = 0;
  page_cfg_t cfg_in;
  logic [5:0] pc;
  logic active, rotate, done;
  int checks = 0, failures = 0;

  cgra_page_seq #(.DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int b, int ls, int le, int l, int it);
    int exp_pc [$];
    int rot_exp = 0, rot_got = 0, cyc = 0, n_it;
    n_it = (it == 0) ? 1 : it;
    for (int i = b; i < ls; i++) exp_pc.push_back(i);
    for (int k = 0; k < n_it; k++) for (int i = ls; i <= le; i++) exp_pc.push_back(i);
    for (int i = le + 1; i <= l; i++) exp_pc.push_back(i);
    rot_exp = n_it;
    @(negedge clk);
    cfg_we = 1; cfg_in = '{base: 8'(b), loop_start: 8'(ls), loop_end: 8'(le), last: 8'(l), iters: 16'(it)};
    @(negedge clk); cfg_we = 0; start = 1;
    @(negedge clk); start = 0;
    while (active) begin
      checks++;
      if (cyc >= exp_pc.size() || int'(pc) != exp_pc[cyc]) begin
        failures++; $display("FAIL pc=%0d at cycle %0d", pc, cyc);
      end
      if (rotate) rot_got++;
      cyc++;
      @(negedge clk);
    end
    checks++; if (cyc != (l - b + 1) + (n_it - 1) * (le - ls + 1)) begin failures++; $display("FAIL length %0d", cyc); end
    checks++; if (rot_got != rot_exp) begin failures++; $display("FAIL rotates %0d", rot_got); end
    checks++; if (!done) begin failures++; $display("FAIL done low"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (active || done) failures++;
    run(2, 4, 6, 8, 3);
    run(0, 0, 0, 0, 5);     // single-instruction kernel, II = 1
    run(10, 11, 14, 14, 0); // iters 0 behaves as 1, no epilogue
    run(5, 5, 9, 12, 7);    // no prologue
    // done clears on start
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++; if (done) begin failures++; $display("FAIL done not cleared"); end
    while (active) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
