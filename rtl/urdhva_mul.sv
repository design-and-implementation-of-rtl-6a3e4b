// urdhva_mul: N x N unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method.
//
// Bit k of the product is formed from the k-th column: every crosswise pair
// a[i] & b[k-i] is summed together with the carry left over from column k-1.
// The low bit of that column sum is product bit k; the rest is carried into
// column k+1. Columns run from 0 to 2N-2, and the carry left after the last
// column is product bit 2N-1. All columns are plain combinational logic, so
// p is valid one propagation delay after a and b settle; there is no clock.
//
// A column holds at most N products and a carry of at most N, so a column
// sum needs clog2(N)+2 bits.
//
// The design uses this block at N = 16 as the four sub-multipliers of the
// 32x32 multiplier. It names the 16x16 Vedic multiplier and its sutra but
// not its insides; the column-by-column form here is this design's reading
// of that sutra.
module urdhva_mul #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned CW = $clog2(N) + 2;  // column-sum width

  always_comb begin
    logic [CW-1:0] col;
    logic [CW-1:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2*N-1; k++) begin
      col = carry;
      for (int i = 0; i < N; i++) begin
        if ((k - i) >= 0 && (k - i) < N) begin
          col = col + CW'(a[i] & b[k-i]);
        end
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*N-1] = carry[0];
  end
endmodule
