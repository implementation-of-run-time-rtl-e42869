// tb_fused_add_node: self-checking test of a registered fused adder node.
// The node is set up with shifts on both operands and a sign vector that
// adds in configuration 0, subtracts b in 1 and subtracts a in 2. Random
// operands and configurations are applied every cycle; one cycle later the
// registered result must equal the reference computed here.
module tb_fused_add_node;
  import rcm_pkg::*;
  localparam int unsigned W = 27;

  logic clk = 0;
  cfg_t cfg;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fused_add_node #(.W(W), .NC(3), .LA(1), .LB(4),
                   .SUB_A(3'b100), .SUB_B(3'b010)) dut (
    .clk(clk), .cfg(cfg), .a(a), .b(b), .y(y));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_y, sa_v, sb_v;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a   = W'($urandom);
      b   = W'($urandom);
      cfg = cfg_t'($urandom_range(0, 2));
      sa_v = a << 1;
      sb_v = b << 4;
      case (cfg)
        2'd0:    exp_y = sa_v + sb_v;
        2'd1:    exp_y = sa_v - sb_v;
        default: exp_y = sb_v - sa_v;
      endcase
      @(posedge clk); #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL cfg=%0d a=%0h b=%0h y=%0h exp=%0h", cfg, a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
