// full_adder: one-bit full adder, the cell that the ripple carry adders are
// chained from.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// The adders of the design are described only as ripple carry adders; this
// gate-level cell is the textbook form of their stage.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
