// tb_urdhva_mul: self-checking testbench for the vertically-and-crosswise
// multiplier.
//
// The 16x16 multiplier is driven with corner cases and random operands; a
// 4x4 instance is driven with all 256 operand pairs. Every product is
// compared with the simulator's own multiplication.
module tb_urdhva_mul;
  int checks = 0;
  int failures = 0;

  logic [15:0] a, b;
  logic [31:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  urdhva_mul dut (.a(a), .b(b), .p(p));
  urdhva_mul #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  task automatic check16(input logic [15:0] ta, input logic [15:0] tb_);
    logic [31:0] expected;
    a = ta; b = tb_;
    #1;
    expected = 32'(ta) * 32'(tb_);
    checks++;
    if (p !== expected) begin
      failures++;
      $display("FAIL 16x16 %h * %h: got %h, expected %h", ta, tb_, p, expected);
    end
  endtask

  initial begin
    check16(16'h0, 16'h0);
    check16(16'hffff, 16'hffff);
    check16(16'hffff, 16'h0001);
    check16(16'h8000, 16'h8000);
    check16(16'haaaa, 16'h5555);
    for (int i = 0; i < 16; i++) check16(16'(1) << i, 16'hffff);
    for (int i = 0; i < 3000; i++) check16(16'($urandom), 16'($urandom));

    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (p4 !== 8'(x * y)) begin
          failures++;
          $display("FAIL 4x4 %0d * %0d: got %0d", x, y, p4);
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
