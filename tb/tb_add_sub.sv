// tb_add_sub: self-checking testbench for the adder/subtractor.
//
// Drives a 64-bit adder (SUB = 0) and a 64-bit subtractor (SUB = 1) with the
// same operands: corner cases (equal operands, a just below b, extremes) and
// random pairs. The adder must give the exact 65-bit sum, the subtractor the
// 65-bit two's complement difference, both computed here independently.
module tb_add_sub;
  int checks = 0;
  int failures = 0;
  int negatives = 0;

  logic [63:0] a, b;
  logic [64:0] y_add, y_sub;

  add_sub #(.W(64), .SUB(1'b0)) dut_add (.a(a), .b(b), .y(y_add));
  add_sub #(.W(64), .SUB(1'b1)) dut_sub (.a(a), .b(b), .y(y_sub));

  task automatic check(input logic [63:0] ta, input logic [63:0] tb_);
    logic [64:0] exp_add, exp_sub;
    a = ta; b = tb_;
    #1;
    exp_add = {1'b0, ta} + {1'b0, tb_};
    exp_sub = {1'b0, ta} - {1'b0, tb_};
    if (ta < tb_) negatives++;
    checks += 2;
    if (y_add !== exp_add) begin
      failures++;
      $display("FAIL add %h + %h: got %h, expected %h", ta, tb_, y_add, exp_add);
    end
    if (y_sub !== exp_sub) begin
      failures++;
      $display("FAIL sub %h - %h: got %h, expected %h", ta, tb_, y_sub, exp_sub);
    end
  endtask

  initial begin
    check(64'h0, 64'h0);
    check(64'h1234, 64'h1234);
    check(64'h1233, 64'h1234);
    check(64'h0, 64'hffff_ffff_ffff_ffff);
    check(64'hffff_ffff_ffff_ffff, 64'h0);
    check(64'hffff_ffff_ffff_ffff, 64'hffff_ffff_ffff_ffff);
    for (int i = 0; i < 2000; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    checks++;
    if (negatives == 0) begin
      failures++;
      $display("FAIL no negative difference exercised");
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
