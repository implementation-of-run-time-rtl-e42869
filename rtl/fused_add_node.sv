// fused_add_node: one two-input adder of a fused pipelined adder graph.
//
// Computes y <= (+/-)(a << LA) + (+/-)(b << LB) and registers the result, so
// every adder is followed by its pipeline register as in a pipelined adder
// graph. Which operand (if any) is subtracted depends on the configuration
// that the current operands belong to: SUB_A[k] / SUB_B[k] give the sign
// vector for configuration k. A node whose sign vectors are all zero is a
// plain adder; a node with a constant sign is a plain subtractor; otherwise it
// is a switchable adder/subtractor.
//
// Interface: cfg is the configuration of the operands present at a and b in
// this cycle. Timing: one cycle from a, b, cfg to y. The data register has no
// reset; only the values of valid samples matter. The shift amounts, sign
// vectors and word width are set by the instantiating graph.
module fused_add_node
  import rcm_pkg::*;
#(
  parameter int unsigned      W      = 27,
  parameter int unsigned      NC     = 3,     // number of configurations
  parameter int unsigned      LA     = 0,     // left shift of operand a
  parameter int unsigned      LB     = 0,     // left shift of operand b
  parameter logic [NC-1:0]    SUB_A  = '0,    // per configuration: subtract a
  parameter logic [NC-1:0]    SUB_B  = '0     // per configuration: subtract b
) (
  input  logic         clk,
  input  cfg_t         cfg,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic         sa, sb;
  logic [W-1:0] sum;
  logic         unused_co;

  always_comb begin
    sa = 1'b0;
    sb = 1'b0;
    if (int'(cfg) < NC) begin
      sa = SUB_A[cfg];
      sb = SUB_B[cfg];
    end
  end

  switchable_addsub #(.W(W)) u_addsub (
    .a  (a << LA),
    .b  (b << LB),
    .sa (sa),
    .sb (sb),
    .s  (sum),
    .co (unused_co)
  );

  always_ff @(posedge clk) y <= sum;

  // The switchable adder cannot subtract both operands.
  initial begin
    for (int k = 0; k < NC; k++)
      assert (!(SUB_A[k] && SUB_B[k]))
        else $error("fused_add_node: configuration %0d subtracts both operands", k);
  end

endmodule
