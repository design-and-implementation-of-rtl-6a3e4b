// mul_complx32x32: complex multiplier for N-bit (default 32) operands.
//
// (re_a + j im_a)(re_b + j im_b) = re_root + j im_root, with
//   re_root = re_a*re_b - im_a*im_b
//   im_root = re_a*im_b + re_b*im_a
// Four vedic_mul32 blocks form the four products, and two add_sub blocks
// combine them: Adder2 subtracts for the real part and Adder1 adds for the
// imaginary part.
//
// Operands are unsigned N-bit numbers. Both results are 2N+1 bits wide: the
// imaginary part is the exact sum; the real part is the difference in two's
// complement, so a negative real part has its top bit set (bit 2N is the
// sign). The whole block is combinational: results follow the inputs after
// one propagation delay, there is no clock and no handshake.
//
// The four-multiplier structure, the adder and subtractor, the port names and
// the 2N+1-bit result width follow the design. Which product pair feeds which
// multiplier beyond "two for the real part, two for the imaginary part" is
// this design's choice.
module mul_complx32x32 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] re_a,
  input  logic [N-1:0] im_a,
  input  logic [N-1:0] re_b,
  input  logic [N-1:0] im_b,
  output logic [2*N:0] re_root,
  output logic [2*N:0] im_root
);
  logic [2*N-1:0] p1, p2, p3, p4;

  vedic_mul32 #(.N(N)) u_mul1 (.x(re_a), .y(im_b), .s(p1));  // re_a*im_b
  vedic_mul32 #(.N(N)) u_mul2 (.x(im_a), .y(re_b), .s(p2));  // im_a*re_b
  vedic_mul32 #(.N(N)) u_mul3 (.x(im_a), .y(im_b), .s(p3));  // im_a*im_b
  vedic_mul32 #(.N(N)) u_mul4 (.x(re_a), .y(re_b), .s(p4));  // re_a*re_b

  // Adder1: imaginary part
  add_sub #(.W(2*N), .SUB(1'b0)) u_adder1 (.a(p2), .b(p1), .y(im_root));

  // Adder2: real part (subtractor)
  add_sub #(.W(2*N), .SUB(1'b1)) u_adder2 (.a(p4), .b(p3), .y(re_root));
endmodule
