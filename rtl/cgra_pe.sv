// cgra_pe -- processing element of the CGRA.
//
// Each cycle the PE executes the instruction its page sequencer presents:
// two operand multiplexers pick from the four mesh neighbours, its own output
// register, the rotating register file, a sign-extended immediate, the load
// data on its page bus, or zero; the functional unit computes; the result is
// registered in the output register that neighbours read, and can also be
// written into the register file. This is the PE drawn in the source (two input
// multiplexers, FU, RF fed back into the multiplexers, output towards
// neighbours and memory).
//
// Memory: LD puts A + B on the page bus as a word address; the word comes
// back on mem_rdata one cycle later, where any PE of the page selects it with
// SRC_MEM. A store takes two PEs of the same page in one cycle, as in the
// source architecture: one issues ST_ADDR (address = A + B), another ST_DATA
// (data = A). Memory operations and NOP leave the output register unchanged.
//
// `en` low (page idle) turns the instruction into a NOP. `rotate` steps the
// RF base. Output register and RF are cleared by reset (choice).
module cgra_pe
  import cgra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  pe_instr_t   instr,
  input  logic        rotate,
  input  data_t       nb_n,
  input  data_t       nb_s,
  input  data_t       nb_e,
  input  data_t       nb_w,
  input  data_t       mem_rdata,
  output data_t       out,
  output pe_mem_req_t req
);

  pe_instr_t ins;
  data_t     rf_rdata, opa, opb, fu_y, imm_ext;
  logic      writes_out;

  assign ins     = en ? instr : INSTR_NOP;
  assign imm_ext = data_t'($signed(ins.imm));

  function automatic data_t sel(input src_e s, input data_t n, input data_t so,
                                input data_t e, input data_t w, input data_t self,
                                input data_t rf, input data_t imm, input data_t mem);
    unique case (s)
      SRC_N:    return n;
      SRC_S:    return so;
      SRC_E:    return e;
      SRC_W:    return w;
      SRC_SELF: return self;
      SRC_RF:   return rf;
      SRC_IMM:  return imm;
      SRC_MEM:  return mem;
      default:  return '0;
    endcase
  endfunction

  assign opa = sel(ins.src_a, nb_n, nb_s, nb_e, nb_w, out, rf_rdata, imm_ext, mem_rdata);
  assign opb = sel(ins.src_b, nb_n, nb_s, nb_e, nb_w, out, rf_rdata, imm_ext, mem_rdata);

  cgra_fu u_fu (.op(ins.op), .a(opa), .b(opb), .y(fu_y));

  cgra_rotating_rf u_rf (
    .clk, .rst_n, .rotate,
    .we    (ins.rf_we && writes_out),
    .waddr (ins.rf_waddr),
    .wdata (fu_y),
    .raddr (ins.rf_raddr),
    .rdata (rf_rdata)
  );

  always_comb begin
    unique case (ins.op)
      OP_NOP, OP_LD, OP_ST_ADDR, OP_ST_DATA: writes_out = 1'b0;
      default:                               writes_out = 1'b1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          out <= '0;
    else if (writes_out) out <= fu_y;
  end

  always_comb begin
    req          = '0;
    req.addr_vld = (ins.op == OP_LD) || (ins.op == OP_ST_ADDR);
    req.is_store = (ins.op == OP_ST_ADDR);
    req.addr     = fu_y;
    req.data_vld = (ins.op == OP_ST_DATA);
    req.data     = fu_y;
  end

endmodule
