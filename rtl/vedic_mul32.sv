// vedic_mul32: N x N unsigned multiplier (N = 32) built from four
// N/2 x N/2 Vedic multipliers and three N-bit ripple carry adders.
//
// The operands are split into halves, x = {XH, XL} and y = {YH, YL}. Four
// urdhva_mul blocks form the partial products
//   m1 = XL*YL, m2 = XL*YH, m3 = XH*YL, m4 = XH*YH   (each N bits wide).
// They are summed as m1 + (m2 + m3) << N/2 + m4 << N:
//   RCA1: m2 + m3                          -> s1, carry ca1
//   RCA2: s1 + m1[N-1:N/2] (zero-extended) -> s2, carry ca2
//   RCA3: m4 + {zeros, carry, s2[N-1:N/2]} -> s[2N-1:N]
// with s[N/2-1:0] = m1[N/2-1:0] and s[N-1:N/2] = s2[N/2-1:0].
// Both ca1 and ca2 weigh 2^(3N/2), which is bit N/2 of RCA3's second operand.
// They can never both be 1 (when ca1 is 1, s1 < 2^N - 2^(N/2+2), so adding
// m1's upper half cannot carry again), so they are merged with an OR into
// that one bit. RCA3's own carry out is always 0, since the product fits in
// 2N bits; a deferred assertion checks that.
//
// Interface: x, y in, s = x*y out. Purely combinational, no clock.
//
// The split, the pairing of halves with the four multipliers and the three
// adders follow the design; merging ca2 into RCA3 (which keeps the product
// exact for every operand pair) is this design's choice. N must be even and
// at least 4.
module vedic_mul32 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] s
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] m1, m2, m3, m4;  // partial products
  logic [N-1:0] s1, s2;          // sums of RCA1 and RCA2
  logic         ca1, ca2, ca3;   // carries out of RCA1..RCA3
  logic [N-1:0] rca2_b, rca3_b;  // zero-padded second operands

  urdhva_mul #(.N(H)) u_mul1 (.a(x[H-1:0]), .b(y[H-1:0]), .p(m1));  // XL*YL
  urdhva_mul #(.N(H)) u_mul2 (.a(x[H-1:0]), .b(y[N-1:H]), .p(m2));  // XL*YH
  urdhva_mul #(.N(H)) u_mul3 (.a(x[N-1:H]), .b(y[H-1:0]), .p(m3));  // XH*YL
  urdhva_mul #(.N(H)) u_mul4 (.a(x[N-1:H]), .b(y[N-1:H]), .p(m4));  // XH*YH

  rca #(.N(N)) u_rca1 (.a(m2), .b(m3), .cin(1'b0), .sum(s1), .cout(ca1));

  assign rca2_b = {{H{1'b0}}, m1[N-1:H]};
  rca #(.N(N)) u_rca2 (.a(s1), .b(rca2_b), .cin(1'b0), .sum(s2), .cout(ca2));

  assign rca3_b = {{(H-1){1'b0}}, ca1 | ca2, s2[N-1:H]};
  rca #(.N(N)) u_rca3 (.a(m4), .b(rca3_b), .cin(1'b0), .sum(s[2*N-1:N]), .cout(ca3));

  // The product of two N-bit numbers fits in 2N bits.
  always_comb begin
    assert final (!ca3) else $error("vedic_mul32: carry out of RCA3");
  end

  assign s[H-1:0] = m1[H-1:0];
  assign s[N-1:H] = s2[H-1:0];
endmodule
