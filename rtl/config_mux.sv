// config_mux: registered multiplexer stage of a fused pipelined adder graph.
//
// Selects, according to the configuration of the current sample, one of N_IN
// inputs, each with its own left shift, and registers it. SEL[k] is the input
// index used in configuration k; the value SEL_ZERO (8'hFF) instead yields 0,
// which is obtained by clearing the output register rather than by a
// multiplexer input, so a zero costs no multiplexer input. Several inputs may
// carry the same signal with different shifts: that is how a multiplexer that
// only switches a shift value is expressed.
//
// The multiplexer itself is written behaviourally; the synthesis tool maps it
// to LUTs (and, on FPGAs that have them, wide-mux slice resources).
// Interface: cfg belongs to the sample present at the inputs. Timing: one
// cycle from in/cfg to y. A configuration index >= NC selects input 0.
module config_mux
  import rcm_pkg::*;
#(
  parameter int unsigned           W     = 27,
  parameter int unsigned           N_IN  = 2,
  parameter int unsigned           NC    = 3,
  parameter logic [N_IN-1:0][7:0]  SHIFT = '0,                 // per input
  parameter logic [NC-1:0][7:0]    SEL   = '0                  // per configuration
) (
  input  logic                     clk,
  input  cfg_t                     cfg,
  input  logic [N_IN-1:0][W-1:0]   in,
  output logic [W-1:0]             y
);

  logic [7:0]   sel;
  logic [W-1:0] d;

  always_comb begin
    sel = (int'(cfg) < NC) ? SEL[cfg] : 8'd0;
    d   = in[0] << SHIFT[0];
    for (int i = 1; i < N_IN; i++)
      if (int'(sel) == i) d = in[i] << SHIFT[i];
  end

  always_ff @(posedge clk) begin
    if (sel == SEL_ZERO) y <= '0;   // zero input: register cleared
    else                 y <= d;
  end

  initial begin
    for (int k = 0; k < NC; k++)
      assert (SEL[k] == SEL_ZERO || int'(SEL[k]) < N_IN)
        else $error("config_mux: configuration %0d selects a missing input", k);
  end

endmodule
