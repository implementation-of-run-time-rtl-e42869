// tb_rscm_1912_1111_1331: self-checking test of the reconfigurable constant
// multiplier. Samples stream in with random gaps, random configurations and
// random values, plus the extreme inputs; a scoreboard holds each sample's
// expected product c*x (c = 1912, 1111, 1331 written out here) and the cycle
// it entered. Each output must match its product and appear exactly 5 cycles
// after its input. A phase that changes the configuration on every cycle
// checks that the constant can be switched from one sample to the next.
module tb_rscm_1912_1111_1331;
  import rcm_pkg::*;

  localparam int LATENCY = 5;
  localparam int NSAMP   = 4000;

  logic clk = 0;
  logic rst_n, in_valid, out_valid;
  cfg_t cfg;
  logic signed [W_IN-1:0]  x;
  logic signed [W_OUT-1:0] y;

  int checks = 0, failures = 0;
  int cycle = 0, sent = 0, got = 0, switches = 0;
  int per_cfg [3] = '{0, 0, 0};

  typedef struct { longint prod; int t_in; } exp_t;
  exp_t sb [$];

  function automatic longint constant_of(input cfg_t k);
    case (k)
      2'd0:    return 1912;
      2'd1:    return 1111;
      default: return 1331;
    endcase
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  rscm_1912_1111_1331 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .cfg(cfg), .x(x),
    .out_valid(out_valid), .y(y));

  initial begin
    repeat (NSAMP * 3 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      got++;
      checks += 2;
      if (sb.size() == 0) begin
        failures += 2;
        $display("FAIL output without input at cycle %0d", cycle);
      end else begin
        e = sb.pop_front();
        if (longint'(y) != e.prod) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d exp=%0d", y, e.prod);
        end
        if (cycle - e.t_in != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d", cycle - e.t_in);
        end
      end
    end
  end

  task automatic send(input logic v, input cfg_t k, input logic signed [W_IN-1:0] val);
    @(negedge clk);
    in_valid = v; cfg = k; x = val;
    if (v) begin
      sb.push_back('{prod: constant_of(k) * longint'(val), t_in: cycle});
      per_cfg[k]++;
      sent++;
    end
  endtask

  initial begin
    cfg_t prev;
    rst_n = 0; in_valid = 0; cfg = '0; x = '0;
    repeat (8) @(posedge clk);
    // out_valid must stay low in reset
    checks++;
    if (out_valid) failures++;
    @(negedge clk) rst_n = 1;

    // extreme inputs in every configuration
    for (int k = 0; k < 3; k++) begin
      send(1, cfg_t'(k), 16'sh7FFF);
      send(1, cfg_t'(k), 16'sh8000);
      send(1, cfg_t'(k), 16'sh0000);
      send(1, cfg_t'(k), -16'sd1);
    end
    // back-to-back reconfiguration: constant changes every cycle
    prev = 2'd2;
    for (int i = 0; i < NSAMP / 2; i++) begin
      cfg_t k;
      k = cfg_t'((int'(prev) + 1 + int'($urandom_range(0, 1))) % 3);
      send(1, k, W_IN'($urandom));
      if (k != prev) switches++;
      prev = k;
    end
    // random gaps and random configurations
    for (int i = 0; i < NSAMP / 2; i++)
      send($urandom_range(0, 3) != 0, cfg_t'($urandom_range(0, 2)), W_IN'($urandom));
    send(0, '0, '0);
    repeat (LATENCY + 3) @(posedge clk);

    checks++;
    if (got != sent || sb.size() != 0) begin
      failures++;
      $display("FAIL sent %0d got %0d", sent, got);
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (per_cfg[k] == 0) failures++;
    end
    checks++;
    if (switches == 0) failures++;
    $display("samples %0d, per configuration %0d/%0d/%0d, switches %0d",
             sent, per_cfg[0], per_cfg[1], per_cfg[2], switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
