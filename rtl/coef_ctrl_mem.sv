// coef_ctrl_mem: store of the FIR coefficients, one predecoded SPT control
// word per tap. Because each word is already the set of control signals the
// multiplier uses, no coefficient decoder is needed between store and
// multiplier.
//
// One write port (we, waddr, wdata), written on the rising clk edge; all
// words are read in parallel on words[] with no latency. Reset loads the
// zero coefficient (term 1 minus an equal term 2) into every word, so a
// filter that is only partly programmed still computes correctly.
// Storing control words instead of binary coefficients follows the
// described design; the write port and the reset contents are this design's
// choices. Writes to an index at or above TAPS are ignored.
module coef_ctrl_mem
  import spt_pkg::*;
#(
  parameter int unsigned TAPS = 16,
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  spt_ctrl_t     wdata,
  output spt_ctrl_t     words [TAPS]
);

  spt_ctrl_t mem_q [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) mem_q[i] <= SPT_ZERO;
    end else if (we && (32'(waddr) < TAPS)) begin
      mem_q[waddr] <= wdata;
    end
  end

  assign words = mem_q;

endmodule
