// tb_rca: self-checking testbench for the ripple carry adder.
//
// Runs the 32-bit adder on corner cases (all ones, carry in/out, a carry
// rippling through every stage) and random operands, and a 4-bit adder on
// every input combination. Each result {cout, sum} is compared with a + b +
// cin computed by the simulator's own arithmetic.
module tb_rca;
  int checks = 0;
  int failures = 0;

  logic [31:0] a, b, sum;
  logic        cin, cout;
  logic [3:0]  a4, b4, sum4;
  logic        cin4, cout4;

  rca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  rca #(.N(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .sum(sum4), .cout(cout4));

  task automatic check32(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] expected;
    a = ta; b = tb_; cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb_} + {32'd0, tc};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL rca32 %h + %h + %b: got %h, expected %h", ta, tb_, tc, {cout, sum}, expected);
    end
  endtask

  initial begin
    check32(32'h0, 32'h0, 1'b0);
    check32(32'hffff_ffff, 32'h0, 1'b1);      // carry through all 32 stages
    check32(32'hffff_ffff, 32'hffff_ffff, 1'b1);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    check32(32'h7fff_ffff, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom, 1'($urandom));

    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); cin4 = 1'(c);
          #1;
          checks++;
          if ({cout4, sum4} !== 5'(x + y + c)) begin
            failures++;
            $display("FAIL rca4 %0d + %0d + %0d: got %0d", x, y, c, {cout4, sum4});
          end
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
