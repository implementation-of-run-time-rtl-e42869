// rscm_1912_1111_1331: pipelined run-time reconfigurable single constant
// multiplier, y = c * x with c in {1912, 1111, 1331}.
//
// Instead of a generic multiplier, the three shift-and-add multipliers
//   1912x = ((x<<8) - 17x) << 3,        17x  = x + (x<<4)
//   1111x = ((x<<1) + 17x) + (273x<<2), 273x = x + (17x<<4)
//   1331x = ((x<<8) - 17x) + (273x<<2)
// are merged into one pipelined adder graph. Nodes that the three graphs
// share are built once; where they differ, a multiplexer or an adder with a
// switchable sign selects what the current configuration needs:
//
//   stage 1  n17   = x + (x<<4)                          (shared adder)
//   stage 2  m1    = cfg 0,2: x<<7   cfg 1: x            (multiplexer)
//   stage 3  n239  = (m1<<1) -/+/- n17  ->  239x / 19x / 239x
//            n273  = x + (n17<<4)       ->  273x (unused in cfg 0)
//   stage 4  m2    = cfg 0: n239<<3     cfg 1,2: n239    (multiplexer)
//            z273  = cfg 0: 0           cfg 1,2: n273    (register cleared)
//   stage 5  y     = m2 + (z273<<2)     ->  1912x / 1111x / 1331x
//
// A register follows every node, multiplexers included, and balancing
// registers carry x and 17x to stage 3. This graph, its shifts, sign vector
// and multiplexer mappings are those of the reference design; the
// configuration pipeline, the valid signal and the word widths are this
// design's own.
//
// Interface: x (signed, W_IN bits) with in_valid and cfg (0: 1912, 1: 1111,
// 2: 1331; 3 is not a configuration and gives an unspecified product).
// Timing: fully pipelined, one sample per cycle, y and out_valid appear 5
// cycles after x. cfg travels with its sample, so the constant can change on
// any cycle and takes effect for the very next sample. All internal words are
// W_OUT bits wide; the products are exact for every W_IN-bit input.
module rscm_1912_1111_1331
  import rcm_pkg::*;
#(
  parameter int unsigned W_X = W_IN,
  parameter int unsigned W_Y = W_X + C_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,     // synchronous, clears out_valid
  input  logic                  in_valid,
  input  cfg_t                  cfg,
  input  logic signed [W_X-1:0] x,
  output logic                  out_valid,
  output logic signed [W_Y-1:0] y
);

  localparam int unsigned W = W_Y;
  localparam int unsigned LATENCY = 5;

  // configuration and valid pipeline, index k = value in stage k
  cfg_t             cfg_q [1:LATENCY-1];
  logic [LATENCY:1] vld_q;

  always_ff @(posedge clk) begin
    cfg_q[1] <= cfg;
    for (int k = 2; k < LATENCY; k++) cfg_q[k] <= cfg_q[k-1];
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LATENCY-1:1], in_valid};
  end

  logic [W-1:0] x_ext;
  logic [W-1:0] s1_x, s1_17;          // stage 1
  logic [W-1:0] s2_m1, s2_x, s2_17;   // stage 2
  logic [W-1:0] s3_239, s3_273;       // stage 3
  logic [W-1:0] s4_m2, s4_273;        // stage 4
  logic [W-1:0] s5_y;                 // stage 5

  assign x_ext = W'(x);               // sign extension

  // ---- stage 1: 17x = x + (x<<4), x delayed
  fused_add_node #(.W(W), .NC(N_CONF), .LA(0), .LB(4)) u_n17 (
    .clk(clk), .cfg(cfg), .a(x_ext), .b(x_ext), .y(s1_17));
  pipe_reg #(.W(W), .NC(N_CONF)) u_r1x (
    .clk(clk), .cfg(cfg), .d(x_ext), .q(s1_x));

  // ---- stage 2: multiplexer on the shift of x, x and 17x delayed
  // input 0 = x<<7 (configurations 0, 2), input 1 = x (configuration 1)
  config_mux #(.W(W), .N_IN(2), .NC(N_CONF),
               .SHIFT({8'd0, 8'd7}),
               .SEL  ({8'd0, 8'd1, 8'd0})) u_m1 (
    .clk(clk), .cfg(cfg_q[1]), .in({s1_x, s1_x}), .y(s2_m1));
  pipe_reg #(.W(W), .NC(N_CONF)) u_r2x (
    .clk(clk), .cfg(cfg_q[1]), .d(s1_x), .q(s2_x));
  pipe_reg #(.W(W), .NC(N_CONF)) u_r217 (
    .clk(clk), .cfg(cfg_q[1]), .d(s1_17), .q(s2_17));

  // ---- stage 3: switchable adder/subtractor and the 273x adder
  // sign vector (-, +, -): 17x is subtracted in configurations 0 and 2
  fused_add_node #(.W(W), .NC(N_CONF), .LA(1), .LB(0),
                   .SUB_A(3'b000), .SUB_B(3'b101)) u_n239 (
    .clk(clk), .cfg(cfg_q[2]), .a(s2_m1), .b(s2_17), .y(s3_239));
  fused_add_node #(.W(W), .NC(N_CONF), .LA(0), .LB(4)) u_n273 (
    .clk(clk), .cfg(cfg_q[2]), .a(s2_x), .b(s2_17), .y(s3_273));

  // ---- stage 4: multiplexer on the shift of 239x/19x; 273x or zero
  // input 0 = n239<<3 (configuration 0), input 1 = n239 (configurations 1, 2)
  config_mux #(.W(W), .N_IN(2), .NC(N_CONF),
               .SHIFT({8'd0, 8'd3}),
               .SEL  ({8'd1, 8'd1, 8'd0})) u_m2 (
    .clk(clk), .cfg(cfg_q[3]), .in({s3_239, s3_239}), .y(s4_m2));
  pipe_reg #(.W(W), .NC(N_CONF), .ZERO_CFG(3'b001)) u_r4273 (
    .clk(clk), .cfg(cfg_q[3]), .d(s3_273), .q(s4_273));

  // ---- stage 5: output adder
  fused_add_node #(.W(W), .NC(N_CONF), .LA(0), .LB(2)) u_nout (
    .clk(clk), .cfg(cfg_q[4]), .a(s4_m2), .b(s4_273), .y(s5_y));

  assign y         = signed'(s5_y);
  assign out_valid = vld_q[LATENCY];

endmodule
