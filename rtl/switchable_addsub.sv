// switchable_addsub: two-input adder whose operands can each be negated.
//
// Computes s = (sa ? -a : a) + (sb ? -b : b) modulo 2**W. It is the adder
// that results when an addition and a subtraction, or two subtractions with
// different subtrahends, are fused into one node of a reconfigurable adder
// graph. The structure follows a carry-chain mapping for FPGA slices: each
// operand bit is XORed with its subtraction flag, the two inverted-or-not bits
// are XORed to form the propagate signal, and a mux carry chain (carry passes
// through when propagate is 1, otherwise the inverted-or-not bit of a is
// taken) with a final XOR produces the sum. The carry into bit 0 is 1 whenever
// one operand is subtracted, which completes the two's complement of that
// operand.
//
// sa and sb both set (-a-b) is not supported: the carry-in would have to be 2.
// A caller must never raise both; the registered nodes that use this adder
// check that with an assertion. The module is purely combinational.
module switchable_addsub #(
  parameter int unsigned W = 27
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sa,   // 1: subtract a
  input  logic         sb,   // 1: subtract b
  output logic [W-1:0] s,
  output logic         co    // carry out of the chain
);

  logic [W-1:0] ai, bi, p;
  logic [W:0]   c;

  assign ai   = a ^ {W{sa}};
  assign bi   = b ^ {W{sb}};
  assign p    = ai ^ bi;
  assign c[0] = sa | sb;

  for (genvar i = 0; i < W; i++) begin : g_chain
    assign c[i+1] = p[i] ? c[i] : ai[i];   // carry multiplexer
    assign s[i]   = p[i] ^ c[i];           // sum XOR
  end

  assign co = c[W];

endmodule
