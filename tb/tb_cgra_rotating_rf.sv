// tb_cgra_rotating_rf -- self-checking test of the rotating register file.
// A reference model keeps its own physical array and base; random writes,
// reads and rotations are compared every cycle. A directed part checks that a
// value written as r[k] is read as r[k+1] after one rotation.
module tb_cgra_rotating_rf;
  import cgra_pkg::*;
  localparam int D = 8;

  logic clk = 0, rst_n = 0, rotate = 0, we = 0;
  logic [2:0] waddr = 0, raddr = 0;
  data_t wdata = 0, rdata;
  int checks = 0, failures = 0;

  data_t model [D];
  int    base = 0;

  cgra_rotating_rf #(.W(DATA_W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(data_t e, string what);
    checks++;
    if (rdata !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, rdata, e); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: write r2 = 0xAAAA, rotate, expect r3 == 0xAAAA
    @(negedge clk); we = 1; waddr = 2; wdata = 32'hAAAA;
    @(negedge clk); we = 0; rotate = 1; raddr = 2; #1 chk(32'hAAAA, "same-iteration read");
    @(negedge clk); rotate = 0; raddr = 3; #1 chk(32'hAAAA, "rotated read r[k+1]");
    model[2] = 32'hAAAA; base = 7;
    // random
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = $urandom; wdata = $urandom;
      rotate = ($urandom_range(0, 3) == 0); raddr = $urandom;
      #1 chk(model[(int'(raddr) + base) % D], "random read");
      @(posedge clk);
      if (we) model[(int'(waddr) + base) % D] = wdata;
      if (rotate) base = (base + D - 1) % D;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
