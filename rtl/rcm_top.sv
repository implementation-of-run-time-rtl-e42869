// rcm_top: top level of the run-time reconfigurable constant multiplication
// design.
//
// It holds two independent parts side by side, each with its own ports:
//   * the pipelined reconfigurable constant multiplier y = c*x,
//     c in {1912, 1111, 1331} selected per sample by mul_cfg
//     (rscm_1912_1111_1331, 5 cycles latency, one sample per cycle);
//   * a fused three-input adder node (fused_ternary_node) as used when adder
//     graphs built from ternary adders are fused; here configured so that
//     configuration 0..3 computes a+b+c, -a+b+c, a-b+c, -a-b+c (1 cycle).
// The two parts share only the clock.
module rcm_top
  import rcm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // reconfigurable constant multiplier
  input  logic                    mul_in_valid,
  input  cfg_t                    mul_cfg,
  input  logic signed [W_IN-1:0]  mul_x,
  output logic                    mul_out_valid,
  output logic signed [W_OUT-1:0] mul_y,
  // ternary add/subtract node
  input  cfg_t                    tern_cfg,
  input  logic [W_OUT-1:0]        tern_a,
  input  logic [W_OUT-1:0]        tern_b,
  input  logic [W_OUT-1:0]        tern_c,
  output logic [W_OUT-1:0]        tern_y
);

  rscm_1912_1111_1331 u_rscm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mul_in_valid),
    .cfg      (mul_cfg),
    .x        (mul_x),
    .out_valid(mul_out_valid),
    .y        (mul_y)
  );

  fused_ternary_node #(.W(W_OUT), .NC(4)) u_tern (
    .clk(clk), .cfg(tern_cfg), .a(tern_a), .b(tern_b), .c(tern_c), .y(tern_y));

endmodule
