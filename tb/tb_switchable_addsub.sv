// tb_switchable_addsub: self-checking test of the switchable adder/subtractor.
// Drives random operands with each supported flag pair (add, subtract a,
// subtract b) plus corner values, and compares the sum and carry-out with
// plain integer arithmetic done in the testbench.
module tb_switchable_addsub;
  localparam int unsigned W = 27;

  logic [W-1:0] a, b, s;
  logic         sa, sb, co;
  int checks = 0, failures = 0;

  switchable_addsub #(.W(W)) dut (.a(a), .b(b), .sa(sa), .sb(sb), .s(s), .co(co));

  task automatic check_one(input logic [W-1:0] ta, tb_, input logic tsa, tsb);
    logic [W:0] full;
    logic [W-1:0] exp_s;
    a = ta; b = tb_; sa = tsa; sb = tsb;
    #1;
    exp_s = (tsa ? -ta : ta) + (tsb ? -tb_ : tb_);
    full  = {1'b0, ta ^ {W{tsa}}} + {1'b0, tb_ ^ {W{tsb}}} + (W+1)'(tsa | tsb);
    checks++;
    if (s !== exp_s || co !== full[W]) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0h b=%0h sa=%0b sb=%0b s=%0h exp=%0h co=%0b exp_co=%0b",
                 ta, tb_, tsa, tsb, s, exp_s, co, full[W]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ra, rb;
    int m;
    // corners
    for (m = 0; m < 3; m++) begin
      check_one('0, '0, m == 1, m == 2);
      check_one('1, '1, m == 1, m == 2);
      check_one({1'b1, {W-1{1'b0}}}, 1, m == 1, m == 2);
      check_one(1, {1'b0, {W-1{1'b1}}}, m == 1, m == 2);
    end
    for (int i = 0; i < 3000; i++) begin
      ra = W'({$urandom, $urandom});
      rb = W'({$urandom, $urandom});
      m  = i % 3;
      check_one(ra, rb, m == 1, m == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
