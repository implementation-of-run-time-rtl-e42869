// pipe_reg: pipeline balancing register of a fused pipelined adder graph.
//
// Delays a word by one cycle so that all operands of an adder come from the
// same pipeline stage. In configurations marked in ZERO_CFG the register is
// cleared instead of loaded, which supplies a zero operand to the next adder
// without a multiplexer. Interface: cfg is the configuration of the sample at
// d. Timing: q follows d (or 0) one cycle later. No reset: only values of
// valid samples matter.
module pipe_reg
  import rcm_pkg::*;
#(
  parameter int unsigned  W        = 27,
  parameter int unsigned  NC       = 3,
  parameter logic [NC-1:0] ZERO_CFG = '0
) (
  input  logic         clk,
  input  cfg_t         cfg,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic clr;

  always_comb clr = (int'(cfg) < NC) ? ZERO_CFG[cfg] : 1'b0;

  always_ff @(posedge clk) q <= clr ? '0 : d;

endmodule
