// add_sub: adder or subtractor of two W-bit unsigned numbers, with a W+1-bit
// result, on one W-bit ripple carry adder.
//
// With SUB = 0, y = a + b: the rca adds a and b and its carry out becomes
// y[W], so the sum is exact.
// With SUB = 1, y = a - b in W+1-bit two's complement: the rca computes
// a + ~b + 1 (b inverted, carry in 1). Its carry out is 1 exactly when
// a >= b, so y[W], the sign, is the inverted carry out.
// Purely combinational, no clock.
//
// The complex multiplier uses one of each on its 2N-bit products: Adder1
// (SUB = 0) for the imaginary part and Adder2 (SUB = 1) for the real part,
// which gives the 2N+1-bit results of the design. Building them as ripple
// carry adders and subtracting in two's complement are this design's choices.
module add_sub #(
  parameter int unsigned W   = 64,
  parameter bit          SUB = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   y
);
  logic [W-1:0] b_eff;
  logic         cout;

  assign b_eff = SUB ? ~b : b;

  rca #(.N(W)) u_rca (.a(a), .b(b_eff), .cin(SUB), .sum(y[W-1:0]), .cout(cout));

  assign y[W] = cout ^ SUB;
endmodule
