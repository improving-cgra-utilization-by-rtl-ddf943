// tb_cgra_fu -- self-checking test of the functional unit.
// Drives every operation with corner and random operands and compares with a
// reference computed here in 64-bit arithmetic.
module tb_cgra_fu;
  import cgra_pkg::*;

  op_e   op;
  data_t a, b, y;
  int    checks = 0, failures = 0;

  cgra_fu dut (.op, .a, .b, .y);

  function automatic data_t ref_fu(op_e o, data_t x, data_t z);
    longint unsigned ux = 64'(x), uz = 64'(z);
    longint          sx = longint'($signed(x)), sz = longint'($signed(z));
    int sh = int'(z[4:0]);
    case (o)
      OP_NOP:  return 0;
      OP_PASS: return x;
      OP_ADD:  return data_t'(ux + uz);
      OP_SUB:  return data_t'(ux - uz);
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_XOR:  return x ^ z;
      OP_SLL:  return data_t'(ux << sh);
      OP_SRL:  return data_t'(ux >> sh);
      OP_SRA:  return data_t'(sx >>> sh);
      OP_SLT:  return (sx < sz) ? 1 : 0;
      OP_SLTU: return (ux < uz) ? 1 : 0;
      OP_MUL:  return data_t'(ux * uz);
      OP_DIV:  return (uz == 0) ? 32'hFFFF_FFFF : data_t'(ux / uz);
      OP_REM:  return (uz == 0) ? x : data_t'(ux % uz);
      OP_LD, OP_ST_ADDR: return data_t'(ux + uz);
      OP_ST_DATA: return x;
      default: return 0;
    endcase
  endfunction

  task automatic check(op_e o, data_t x, data_t z);
    data_t e;
    op = o; a = x; b = z; #1;
    e = ref_fu(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_0021};
    for (int o = 0; o <= int'(OP_ST_DATA); o++) begin
      foreach (corners[i]) foreach (corners[j]) check(op_e'(o), corners[i], corners[j]);
      for (int k = 0; k < 200; k++) check(op_e'(o), $urandom, (k % 3 == 0) ? data_t'($urandom_range(0, 40)) : $urandom);
    end
    // a few hand-worked values
    op = OP_MUL; a = 7; b = 6; #1; checks++; if (y != 42) failures++;
    op = OP_SRA; a = 32'hF000_0000; b = 4; #1; checks++; if (y != 32'hFF00_0000) failures++;
    op = OP_DIV; a = 100; b = 7; #1; checks++; if (y != 14) failures++;
    op = OP_REM; a = 100; b = 7; #1; checks++; if (y != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
