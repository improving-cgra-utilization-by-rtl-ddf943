// tb_cgra_pe -- self-checking test of one processing element.
// Directed instruction sequences check every operand source, the output
// register (update, hold on NOP, memory ops and while disabled), RF write and
// rotated read-back, and the bus requests of LD / ST_ADDR / ST_DATA.
module tb_cgra_pe;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, rotate = 0;
  pe_instr_t instr;
  data_t nb_n = 32'h11, nb_s = 32'h22, nb_e = 32'h33, nb_w = 32'h44, mem_rdata = 32'h55;
  data_t out;
  pe_mem_req_t req;
  int checks = 0, failures = 0;

  cgra_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pe_instr_t mk(op_e op, src_e a, src_e b, int imm = 0,
                                   bit we = 0, int wa = 0, int ra = 0);
    pe_instr_t i;
    i.op = op; i.src_a = a; i.src_b = b; i.imm = IMM_W'(imm);
    i.rf_we = we; i.rf_waddr = RF_AW'(wa); i.rf_raddr = RF_AW'(ra);
    return i;
  endfunction

  task automatic step(pe_instr_t i, logic rot = 0);
    @(negedge clk); instr = i; rotate = rot;
    @(posedge clk); #1;
  endtask

  task automatic expect_out(data_t e, string what);
    checks++;
    if (out !== e) begin failures++; $display("FAIL %s: out=%h exp=%h", what, out, e); end
  endtask

  initial begin
    instr = INSTR_NOP;
    repeat (2) @(posedge clk);
    rst_n = 1; en = 1;
    step(mk(OP_ADD, SRC_N, SRC_S));             expect_out(32'h33, "N+S");
    step(mk(OP_SUB, SRC_E, SRC_W));             expect_out(32'hFFFF_FFEF, "E-W");
    step(mk(OP_PASS, SRC_MEM, SRC_ZERO));       expect_out(32'h55, "mem");
    step(mk(OP_ADD, SRC_SELF, SRC_IMM, -6));    expect_out(32'h4F, "self+imm(neg)");
    step(mk(OP_MUL, SRC_SELF, SRC_IMM, 3));     expect_out(32'hED, "self*3");
    step(INSTR_NOP);                            expect_out(32'hED, "hold on NOP");
    // RF: write 0x1234 to r1, rotate, read it back as r2
    step(mk(OP_PASS, SRC_IMM, SRC_ZERO, 12'h234, 1, 1, 0), 1);
    expect_out(32'h234, "pass imm + rf write");
    step(mk(OP_ADD, SRC_RF, SRC_ZERO, 0, 0, 0, 2)); expect_out(32'h234, "rf r[k+1] after rotate");
    step(mk(OP_ADD, SRC_RF, SRC_ZERO, 0, 0, 0, 1)); expect_out(32'h0, "rf old slot");
    // load request: combinational, address = a + b
    @(negedge clk); instr = mk(OP_LD, SRC_N, SRC_IMM, 100); #1;
    checks++; if (!(req.addr_vld && !req.is_store && !req.data_vld && req.addr == 32'h11 + 100)) begin failures++; $display("FAIL LD req"); end
    @(posedge clk); #1 expect_out(32'h0, "LD leaves out");
    @(negedge clk); instr = mk(OP_ST_ADDR, SRC_W, SRC_IMM, 8); #1;
    checks++; if (!(req.addr_vld && req.is_store && !req.data_vld && req.addr == 32'h4C)) begin failures++; $display("FAIL ST_ADDR req"); end
    @(negedge clk); instr = mk(OP_ST_DATA, SRC_E, SRC_ZERO); #1;
    checks++; if (!(!req.addr_vld && req.data_vld && req.data == 32'h33)) begin failures++; $display("FAIL ST_DATA req"); end
    @(posedge clk); #1 expect_out(32'h0, "ST leaves out");
    // disabled: instruction ignored, no request
    @(negedge clk); en = 0; instr = mk(OP_LD, SRC_N, SRC_IMM, 1); #1;
    checks++; if (req.addr_vld || req.data_vld) begin failures++; $display("FAIL request while disabled"); end
    step(mk(OP_ADD, SRC_N, SRC_S)); expect_out(32'h0, "disabled holds");
    en = 1;
    step(mk(OP_XOR, SRC_N, SRC_IMM, 12'h0FF)); expect_out(32'hEE, "xor imm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
