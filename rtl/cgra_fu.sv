// cgra_fu -- functional unit of one PE.
//
// Combinational: y = op(a, b). The unit combines an integer ALU (add,
// subtract, shifts, bitwise logic, compares, pass-through for routing) and a
// complex ALU (multiply, divide, remainder), matching the PE content assumed by
// the source architecture. Every operation completes in the cycle it is
// issued; the PE registers the result. Which operations exist follows the
// source; single-cycle division, unsigned arithmetic except SRA/SLT, and the
// results of division by zero (quotient all ones, remainder = dividend) are
// this design's choices. For the memory opcodes the unit forms the bus value:
// LD and ST_ADDR give the word address a + b, ST_DATA gives the data a.
module cgra_fu
  import cgra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  op_e          op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  localparam int unsigned SH_W = $clog2(W);

  logic [SH_W-1:0] shamt;
  assign shamt = b[SH_W-1:0];

  always_comb begin
    unique case (op)
      OP_NOP:  y = '0;
      OP_PASS: y = a;
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << shamt;
      OP_SRL:  y = a >> shamt;
      OP_SRA:  y = W'($signed(a) >>> shamt);
      OP_SLT:  y = W'($signed(a) < $signed(b));
      OP_SLTU: y = W'(a < b);
      OP_MUL:  y = a * b;
      OP_DIV:  y = (b == '0) ? '1 : a / b;
      OP_REM:  y = (b == '0) ? a  : a % b;
      OP_LD, OP_ST_ADDR: y = a + b;       // word address = base + offset
      OP_ST_DATA:        y = a;
      default: y = '0;
    endcase
  end

endmodule
