// rca: N-bit ripple carry adder.
//
// A chain of N full adders: stage i adds a[i], b[i] and the carry out of
// stage i-1; stage 0 takes cin, and the carry out of the last stage is cout.
// So {cout, sum} = a + b + cin, with the carry rippling from bit 0 to bit N-1
// (delay grows linearly with N). Purely combinational, no clock.
//
// The 32x32 multiplier uses three of these at N = 32 to sum its four partial
// products, and the complex multiplier uses two wider ones (through add_sub)
// for its final addition and subtraction. The ripple structure is the one the
// design names; the carry-in port is this design's addition, used by the
// subtractor to add the +1 of two's complement negation.
module rca #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;  // c[i] is the carry into stage i

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
