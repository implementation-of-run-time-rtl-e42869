// tb_rcm_top: end-to-end test of rcm_top at its default parameters.
//
// Multiplier: a stream of signed 16-bit samples with random gaps goes in;
// each product is checked against c*x (c = 1912, 1111, 1331 written out
// here) and against the 5-cycle latency. The test counts, and requires at
// least once each: every configuration, the subtracting and the adding mode
// of the switchable adder/subtractor (configurations 0, 2 and 1), the zero
// operand made by clearing a register (configuration 0), a change of constant
// between two back-to-back samples, a bubble in the input stream, and the
// extreme inputs. Ternary node: all four operations a+b+c, -a+b+c, a-b+c and
// -a-b+c are applied and checked one cycle later.
module tb_rcm_top;
  import rcm_pkg::*;

  localparam int LATENCY = 5;
  localparam int NSAMP   = 3000;

  logic clk = 0;
  logic rst_n, mul_in_valid, mul_out_valid;
  cfg_t mul_cfg, tern_cfg;
  logic signed [W_IN-1:0]  mul_x;
  logic signed [W_OUT-1:0] mul_y;
  logic [W_OUT-1:0] tern_a, tern_b, tern_c, tern_y;

  int checks = 0, failures = 0, cycle = 0;
  int sent = 0, got = 0;
  // mechanism counters
  int n_cfg [3] = '{0, 0, 0};
  int n_sub = 0, n_add = 0, n_zero = 0, n_switch = 0, n_bubble = 0, n_extreme = 0;
  int n_tern [4] = '{0, 0, 0, 0};

  typedef struct { longint prod; int t_in; } exp_t;
  exp_t sb [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  rcm_top dut (
    .clk(clk), .rst_n(rst_n),
    .mul_in_valid(mul_in_valid), .mul_cfg(mul_cfg), .mul_x(mul_x),
    .mul_out_valid(mul_out_valid), .mul_y(mul_y),
    .tern_cfg(tern_cfg), .tern_a(tern_a), .tern_b(tern_b), .tern_c(tern_c),
    .tern_y(tern_y));

  initial begin
    repeat (NSAMP * 4 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint constant_of(input cfg_t k);
    case (k)
      2'd0:    return 1912;
      2'd1:    return 1111;
      default: return 1331;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && mul_out_valid) begin
      exp_t e;
      got++;
      checks += 2;
      if (sb.size() == 0) begin
        failures += 2;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = sb.pop_front();
        if (longint'(mul_y) != e.prod) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d exp=%0d", mul_y, e.prod);
        end
        if (cycle - e.t_in != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d", cycle - e.t_in);
        end
      end
    end
  end

  // multiplier stimulus
  logic have_prev = 0;
  cfg_t prev_cfg;
  task automatic send(input logic v, input cfg_t k, input logic signed [W_IN-1:0] val);
    @(negedge clk);
    mul_in_valid = v; mul_cfg = k; mul_x = val;
    if (v) begin
      sb.push_back('{prod: constant_of(k) * longint'(val), t_in: cycle});
      sent++;
      n_cfg[k]++;
      if (k == 2'd1) n_add++; else n_sub++;
      if (k == 2'd0) n_zero++;
      if (have_prev && prev_cfg != k) n_switch++;
      if (val == 16'sh7FFF || val == 16'sh8000) n_extreme++;
      prev_cfg = k; have_prev = 1;
    end else begin
      n_bubble++;
      have_prev = 0;
    end
  endtask

  initial begin
    rst_n = 0; mul_in_valid = 0; mul_cfg = '0; mul_x = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      send(1, cfg_t'(k), 16'sh7FFF);
      send(1, cfg_t'(k), 16'sh8000);
    end
    for (int i = 0; i < NSAMP; i++) begin
      logic v;
      v = ($urandom_range(0, 4) != 0);
      send(v, cfg_t'($urandom_range(0, 2)), W_IN'($urandom));
    end
    send(0, '0, '0);
    repeat (LATENCY + 3) @(posedge clk);
  end

  // ternary node stimulus and check, runs alongside
  initial begin
    logic [W_OUT-1:0] e;
    tern_cfg = '0; tern_a = '0; tern_b = '0; tern_c = '0;
    @(posedge rst_n);
    for (int i = 0; i < NSAMP; i++) begin
      @(negedge clk);
      tern_a = W_OUT'($urandom); tern_b = W_OUT'($urandom); tern_c = W_OUT'($urandom);
      tern_cfg = cfg_t'($urandom_range(0, 3));
      case (tern_cfg)
        2'd0: e =  tern_a + tern_b + tern_c;
        2'd1: e = -tern_a + tern_b + tern_c;
        2'd2: e =  tern_a - tern_b + tern_c;
        default: e = -tern_a - tern_b + tern_c;
      endcase
      n_tern[tern_cfg]++;
      @(posedge clk); #1;
      checks++;
      if (tern_y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL ternary cfg=%0d y=%0h exp=%0h", tern_cfg, tern_y, e);
      end
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (rst_n === 1'b1);
    repeat (NSAMP + 100) @(posedge clk);
    wait (sent > 0 && got == sent);
    repeat (LATENCY + 3) @(posedge clk);
    checks++;
    if (got != sent || sb.size() != 0) begin
      failures++;
      $display("FAIL sent %0d got %0d", sent, got);
    end
    $display("mechanisms:");
    need("configuration 0 (1912)", n_cfg[0]);
    need("configuration 1 (1111)", n_cfg[1]);
    need("configuration 2 (1331)", n_cfg[2]);
    need("adder/subtractor subtracting", n_sub);
    need("adder/subtractor adding", n_add);
    need("zero operand by register clear", n_zero);
    need("back-to-back reconfiguration", n_switch);
    need("input bubble", n_bubble);
    need("extreme input", n_extreme);
    need("ternary a+b+c", n_tern[0]);
    need("ternary -a+b+c", n_tern[1]);
    need("ternary a-b+c", n_tern[2]);
    need("ternary -a-b+c", n_tern[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
