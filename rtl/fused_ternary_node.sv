// fused_ternary_node: one three-input adder of a fused pipelined adder graph.
//
// FPGAs with ternary-adder support can add three words in one carry chain, so
// an adder graph built from three-input nodes needs fewer nodes and fewer
// multiplexer inputs. When such graphs are fused, each node has to realise,
// per configuration, one of a+b+c, -a+b+c, a-b+c or -a-b+c (the operand c is
// never negated; an operand order with a negated c is handled by swapping
// operands when the graph is built). When a two-input node of one
// configuration is fused with a three-input node of another, the unused input
// must add zero: ZERO_A/B/C mark, per configuration, an operand forced to 0.
//
// Implementation: each negated operand is bit-inverted and a carry of one per
// negated operand is added, i.e. y = ~a' + ~b' + c + na + nb for negated a',
// b'. The result is registered (one cycle latency), as every node of a
// pipelined adder graph is. Interface: cfg belongs to the operands present
// in this cycle; a configuration index >= NC adds all three operands.
module fused_ternary_node
  import rcm_pkg::*;
#(
  parameter int unsigned   W      = 27,
  parameter int unsigned   NC     = 4,
  parameter int unsigned   LA     = 0,
  parameter int unsigned   LB     = 0,
  parameter int unsigned   LC     = 0,
  parameter logic [NC-1:0] NEG_A  = 4'b1010,   // configurations 1 and 3 negate a
  parameter logic [NC-1:0] NEG_B  = 4'b1100,   // configurations 2 and 3 negate b
  parameter logic [NC-1:0] ZERO_A = '0,
  parameter logic [NC-1:0] ZERO_B = '0,
  parameter logic [NC-1:0] ZERO_C = '0
) (
  input  logic         clk,
  input  cfg_t         cfg,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  logic         na, nb, za, zb, zc;
  logic [W-1:0] ai, bi, ci, sum;

  always_comb begin
    {na, nb, za, zb, zc} = '0;
    if (int'(cfg) < NC) begin
      na = NEG_A[cfg];
      nb = NEG_B[cfg];
      za = ZERO_A[cfg];
      zb = ZERO_B[cfg];
      zc = ZERO_C[cfg];
    end
    ai  = (za ? '0 : (a << LA)) ^ {W{na}};
    bi  = (zb ? '0 : (b << LB)) ^ {W{nb}};
    ci  =  zc ? '0 : (c << LC);
    sum = ai + bi + ci + W'(na) + W'(nb);
  end

  always_ff @(posedge clk) y <= sum;

endmodule
