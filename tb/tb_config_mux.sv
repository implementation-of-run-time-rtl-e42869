// tb_config_mux: self-checking test of the registered configuration
// multiplexer. Three inputs with shifts 0, 2 and 5; configuration 0 selects
// the zero (register clear), 1 selects input 2, 2 selects input 1, 3 selects
// input 0. The output is checked one cycle after each random input vector.
module tb_config_mux;
  import rcm_pkg::*;
  localparam int unsigned W = 27;

  logic clk = 0;
  cfg_t cfg;
  logic [2:0][W-1:0] in;
  logic [W-1:0] y;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  config_mux #(.W(W), .N_IN(3), .NC(4),
               .SHIFT({8'd5, 8'd2, 8'd0}),
               .SEL({8'd0, 8'd1, 8'd2, SEL_ZERO})) dut (
    .clk(clk), .cfg(cfg), .in(in), .y(y));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_y;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) in[k] = W'($urandom);
      cfg = cfg_t'($urandom_range(0, 3));
      case (cfg)
        2'd0: exp_y = '0;
        2'd1: exp_y = in[2] << 5;
        2'd2: exp_y = in[1] << 2;
        default: exp_y = in[0];
      endcase
      seen[cfg]++;
      @(posedge clk); #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL cfg=%0d y=%0h exp=%0h", cfg, y, exp_y);
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
