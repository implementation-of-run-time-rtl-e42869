// tb_rscm_exhaustive: exhaustive test of the reconfigurable constant
// multiplier at its default 16-bit input width. Every input value from
// -32768 to 32767 is streamed through back to back in each of the three
// configurations, and in a fourth pass the configuration changes on every
// sample. Each product is compared with c*x and its 5-cycle latency checked.
module tb_rscm_exhaustive;
  import rcm_pkg::*;

  localparam int LATENCY = 5;
  localparam int NVAL    = 1 << W_IN;

  logic clk = 0;
  logic rst_n, in_valid, out_valid;
  cfg_t cfg;
  logic signed [W_IN-1:0]  x;
  logic signed [W_OUT-1:0] y;

  int checks = 0, failures = 0, cycle = 0, sent = 0, got = 0;

  typedef struct { longint prod; int t_in; } exp_t;
  exp_t sb [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  rscm_1912_1111_1331 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .cfg(cfg), .x(x),
    .out_valid(out_valid), .y(y));

  function automatic longint constant_of(input cfg_t k);
    case (k)
      2'd0:    return 1912;
      2'd1:    return 1111;
      default: return 1331;
    endcase
  endfunction

  initial begin
    repeat (4 * NVAL + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      got++;
      checks++;
      if (sb.size() == 0) failures++;
      else begin
        e = sb.pop_front();
        if (longint'(y) != e.prod || cycle - e.t_in != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d exp=%0d latency=%0d", y, e.prod, cycle - e.t_in);
        end
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; cfg = '0; x = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      for (int v = 0; v < NVAL; v++) begin
        @(negedge clk);
        in_valid = 1;
        x   = W_IN'(v);
        cfg = (pass < 3) ? cfg_t'(pass) : cfg_t'(v % 3);
        sb.push_back('{prod: constant_of(cfg) * longint'(x), t_in: cycle});
        sent++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LATENCY + 3) @(posedge clk);
    checks++;
    if (got != sent) failures++;
    $display("products checked: %0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
