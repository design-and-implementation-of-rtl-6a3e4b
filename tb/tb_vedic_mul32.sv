// tb_vedic_mul32: self-checking testbench for the 32x32 multiplier built
// from four 16x16 multipliers and three ripple carry adders.
//
// The 32-bit multiplier gets corner cases, random operands and operands
// chosen to make each of the two middle carries (out of RCA1 and out of
// RCA2) occur; an 8-bit instance is run on all 65536 operand pairs. Products
// are compared with the simulator's multiplication. The test also counts how
// often each carry occurred and fails if either never did.
module tb_vedic_mul32;
  int checks = 0;
  int failures = 0;
  int n_ca1 = 0;
  int n_ca2 = 0;

  logic [31:0] x, y;
  logic [63:0] s;
  logic [7:0]  x8, y8;
  logic [15:0] s8;

  vedic_mul32 dut (.x(x), .y(y), .s(s));
  vedic_mul32 #(.N(8)) dut8 (.x(x8), .y(y8), .s(s8));

  task automatic check32(input logic [31:0] tx, input logic [31:0] ty);
    logic [63:0] expected;
    x = tx; y = ty;
    #1;
    expected = 64'(tx) * 64'(ty);
    if (dut.ca1) n_ca1++;
    if (dut.ca2) n_ca2++;
    checks++;
    if (s !== expected) begin
      failures++;
      $display("FAIL 32x32 %h * %h: got %h, expected %h", tx, ty, s, expected);
    end
  endtask

  initial begin
    check32(32'h0, 32'h0);
    check32(32'hffff_ffff, 32'hffff_ffff);   // carry out of RCA1
    check32(32'hffff_ffff, 32'h0002_ffff);   // carry out of RCA2 only
    check32(32'h0001_ffff, 32'hffff_ffff);
    check32(32'h8000_0008, 32'h8000_0008);
    check32(32'h0000_ffff, 32'hffff_0000);
    for (int i = 0; i < 3000; i++) check32($urandom, $urandom);

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j);
        #1;
        checks++;
        if (s8 !== 16'(i * j)) begin
          failures++;
          $display("FAIL 8x8 %0d * %0d: got %0d", i, j, s8);
        end
      end

    $display("carry out of RCA1: %0d times, out of RCA2: %0d times", n_ca1, n_ca2);
    checks += 2;
    if (n_ca1 == 0) begin failures++; $display("FAIL RCA1 carry never occurred"); end
    if (n_ca2 == 0) begin failures++; $display("FAIL RCA2 carry never occurred"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
