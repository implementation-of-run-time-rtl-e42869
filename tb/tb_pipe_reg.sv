// tb_pipe_reg: self-checking test of the balancing register with a
// per-configuration clear. Configuration 1 must give 0, configurations 0 and
// 2 must give the input of the previous cycle.
module tb_pipe_reg;
  import rcm_pkg::*;
  localparam int unsigned W = 27;

  logic clk = 0;
  cfg_t cfg;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0, cleared = 0;

  always #5 clk = ~clk;

  pipe_reg #(.W(W), .NC(3), .ZERO_CFG(3'b010)) dut (
    .clk(clk), .cfg(cfg), .d(d), .q(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_q;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d   = W'($urandom) | 1;        // never zero, so a clear is visible
      cfg = cfg_t'($urandom_range(0, 2));
      exp_q = (cfg == 2'd1) ? '0 : d;
      if (cfg == 2'd1) cleared++;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL cfg=%0d d=%0h q=%0h", cfg, d, q);
      end
    end
    checks++;
    if (cleared == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
