// tb_mul_complx32x32_full: the complex multiplier at its default 32-bit
// operand width, taken through the published 32-bit reference operations
// and a batch of random ones.
//
// Each result is compared with re_a*re_b - im_a*im_b (65-bit two's
// complement) and re_a*im_b + re_b*im_a worked out here.
module tb_mul_complx32x32_full;
  int checks = 0;
  int failures = 0;

  logic [31:0] re_a, im_a, re_b, im_b;
  logic [64:0] re_root, im_root;

  mul_complx32x32 dut (
    .re_a(re_a), .im_a(im_a), .re_b(re_b), .im_b(im_b), .re_root(re_root), .im_root(im_root));

  task automatic run(input logic [31:0] ra, input logic [31:0] ia, input logic [31:0] rb,
                     input logic [31:0] ib);
    logic [64:0] exp_re, exp_im;
    re_a = ra; im_a = ia; re_b = rb; im_b = ib;
    #1;
    exp_re = (65'(ra) * 65'(rb)) - (65'(ia) * 65'(ib));
    exp_im = (65'(ra) * 65'(ib)) + (65'(rb) * 65'(ia));
    checks += 2;
    if (re_root !== exp_re) begin
      failures++;
      $display("FAIL re_root for %h %h %h %h: got %h, expected %h", ra, ia, rb, ib, re_root, exp_re);
    end
    if (im_root !== exp_im) begin
      failures++;
      $display("FAIL im_root for %h %h %h %h: got %h, expected %h", ra, ia, rb, ib, im_root, exp_im);
    end
  endtask

  initial begin
    run(32'hf403bf08, 32'h1fe60005, 32'hfff9c040, 32'h19c0bfc5);
    checks += 2;
    if (re_root !== 65'h0f0c84fc7f03c0327) begin failures++; $display("FAIL published re_root"); end
    if (im_root !== 65'h038714ff119c9ba68) begin failures++; $display("FAIL published im_root"); end
    run(32'h80000008, 32'h80000008, 32'h80000008, 32'h80000008);
    run(32'hffffffff, 32'hffffffff, 32'hffffffff, 32'hffffffff);
    run(32'h0, 32'hffffffff, 32'h0, 32'hffffffff);
    for (int i = 0; i < 2000; i++) run($urandom, $urandom, $urandom, $urandom);
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
