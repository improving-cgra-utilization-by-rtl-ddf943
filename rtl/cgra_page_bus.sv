// cgra_page_bus -- load/store bus of one page.
//
// The source architecture gives every column one memory bus that carries one
// load or store per cycle, and needs two PEs of a column in the same cycle for
// a store (address from one, data from the other). Here each page owns one bus
// segment, so pages of different threads in one column never compete. Per
// cycle the bus turns its PEs' requests into at most one data-memory access:
//   * one PE with LD               -> read  at its address (data next cycle)
//   * one ST_ADDR + one ST_DATA    -> write data at address
// Combinational. Rule breaks -- two address drivers, two data drivers, a store
// half without the other -- raise `err_now` and the sticky `err`; the lowest
// PE wins a conflict and an incomplete store is dropped (choices). Addresses
// are word addresses, truncated to the memory's AW bits.
module cgra_page_bus
  import cgra_pkg::*;
#(
  parameter int unsigned PAGE_PES = 4,
  parameter int unsigned AW       = 14
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  pe_mem_req_t [PAGE_PES-1:0] req,
  output logic                       mem_en,
  output logic                       mem_we,
  output logic [AW-1:0]              mem_addr,
  output data_t                      mem_wdata,
  output logic                       err_now,
  output logic                       err
);

  logic        a_any, d_any, a_multi, d_multi, a_store;
  data_t       a_addr, d_data;

  always_comb begin
    a_any = 1'b0; d_any = 1'b0; a_multi = 1'b0; d_multi = 1'b0;
    a_store = 1'b0; a_addr = '0; d_data = '0;
    for (int i = 0; i < PAGE_PES; i++) begin
      if (req[i].addr_vld) begin
        if (a_any) a_multi = 1'b1;
        else begin
          a_any   = 1'b1;
          a_store = req[i].is_store;
          a_addr  = req[i].addr;
        end
      end
      if (req[i].data_vld) begin
        if (d_any) d_multi = 1'b1;
        else begin
          d_any  = 1'b1;
          d_data = req[i].data;
        end
      end
    end
  end

  assign mem_en    = a_any && (!a_store || d_any);
  assign mem_we    = a_any && a_store && d_any;
  assign mem_addr  = a_addr[AW-1:0];
  assign mem_wdata = d_data;
  assign err_now   = a_multi || d_multi || (a_any && a_store && !d_any)
                   || (d_any && !(a_any && a_store));

  always_ff @(posedge clk) begin
    if (!rst_n)       err <= 1'b0;
    else if (err_now) err <= 1'b1;
  end

  // One access per bus per cycle and complete stores are the compiler's
  // obligations; report a schedule that breaks them.
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !err_now)
    else $warning("page bus: conflicting or incomplete memory request");

endmodule
