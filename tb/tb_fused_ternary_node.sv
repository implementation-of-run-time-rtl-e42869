// tb_fused_ternary_node: self-checking test of the registered three-input
// fused adder node. Instance u_ops uses the default sign vectors
// (configuration 0..3: a+b+c, -a+b+c, a-b+c, -a-b+c). Instance u_zero has
// shifts on all inputs and forces a to zero in configuration 0 and c to zero
// in configuration 2, as when a two-input node is fused with a three-input
// one. Results are compared one cycle later with integer arithmetic.
module tb_fused_ternary_node;
  import rcm_pkg::*;
  localparam int unsigned W = 27;

  logic clk = 0;
  cfg_t cfg;
  logic [W-1:0] a, b, c, y_ops, y_zero;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  fused_ternary_node #(.W(W)) u_ops (
    .clk(clk), .cfg(cfg), .a(a), .b(b), .c(c), .y(y_ops));

  fused_ternary_node #(.W(W), .NC(4), .LA(1), .LB(2), .LC(3),
                       .NEG_A(4'b0010), .NEG_B(4'b0100),
                       .ZERO_A(4'b0001), .ZERO_C(4'b0100)) u_zero (
    .clk(clk), .cfg(cfg), .a(a), .b(b), .c(c), .y(y_zero));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e_ops, e_zero;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      cfg = cfg_t'($urandom_range(0, 3));
      seen[cfg]++;
      case (cfg)
        2'd0: e_ops =  a + b + c;
        2'd1: e_ops = -a + b + c;
        2'd2: e_ops =  a - b + c;
        default: e_ops = -a - b + c;
      endcase
      case (cfg)
        2'd0: e_zero =            (b << 2) + (c << 3);
        2'd1: e_zero = -(a << 1) + (b << 2) + (c << 3);
        2'd2: e_zero =  (a << 1) - (b << 2);
        default: e_zero = (a << 1) + (b << 2) + (c << 3);
      endcase
      @(posedge clk); #1;
      checks += 2;
      if (y_ops !== e_ops) begin
        failures++;
        if (failures < 10) $display("FAIL ops cfg=%0d y=%0h exp=%0h", cfg, y_ops, e_ops);
      end
      if (y_zero !== e_zero) begin
        failures++;
        if (failures < 10) $display("FAIL zero cfg=%0d y=%0h exp=%0h", cfg, y_zero, e_zero);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
