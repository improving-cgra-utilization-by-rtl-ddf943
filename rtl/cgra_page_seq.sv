// cgra_page_seq -- instruction counter of one page.
//
// A page is the unit the run-time schedule transform places schedules on;
// giving every page its own counter lets pages run different threads' kernels
// at the same time (space multiplexing). The counter walks a window of the
// page's instruction memory one instruction per cycle: the prologue from
// `base`, the kernel from `loop_start` to `loop_end` repeated `iters` times
// (0 counts as 1), then the epilogue up to `last`, after which the page stops
// and raises the sticky `done`. The source describes the counter that walks
// instruction memory and resets at the end of the kernel, and the
// prologue/kernel/epilogue split; the per-page window record is this design's
// choice.
//
// Interface/timing: `cfg_we` loads the window (takes effect at the next
// start; do not write it while the page runs). `start` (one cycle) sets pc to
// base from the next cycle on; `active` is high in each cycle whose pc
// executes. `rotate` is high in the cycle that executes loop_end, so the
// register files rotate at the end of every kernel iteration. Total run time
// = (last-base+1) + (iters-1)*(loop_end-loop_start+1) cycles. Requires
// base <= loop_start <= loop_end <= last < DEPTH.
module cgra_page_seq
  import cgra_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cfg_we,
  input  page_cfg_t cfg_in,
  input  logic      start,
  output logic [AW-1:0] pc,
  output logic      active,
  output logic      rotate,
  output logic      done
);

  page_cfg_t         cfg;
  logic [PC_W-1:0]   pc_q;
  logic [ITER_W-1:0] iter_left;
  logic              running;

  assign pc     = AW'(pc_q);
  assign active = running;
  assign rotate = running && (pc_q == cfg.loop_end);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg       <= '0;
      pc_q      <= '0;
      iter_left <= '0;
      running   <= 1'b0;
      done      <= 1'b0;
    end else begin
      if (cfg_we) cfg <= cfg_in;
      if (start) begin
        pc_q      <= cfg.base;
        iter_left <= (cfg.iters == '0) ? ITER_W'(1) : cfg.iters;
        running   <= 1'b1;
        done      <= 1'b0;
      end else if (running) begin
        if (pc_q == cfg.loop_end && iter_left > ITER_W'(1)) begin
          pc_q      <= cfg.loop_start;          // back to the top of the kernel
          iter_left <= iter_left - 1'b1;
        end else if (pc_q == cfg.last) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          pc_q <= pc_q + 1'b1;
        end
      end
    end
  end

endmodule
