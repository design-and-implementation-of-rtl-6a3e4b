// tb_mul_complx32x32: end-to-end self-checking testbench for the complex
// multiplier at the three operand widths the design is evaluated at.
//
// Three instances, N = 8, 16 and 32, are driven with published reference
// operand sets (with their published results) and with random operands.
// Every result is checked against re_a*re_b - im_a*im_b (2N+1-bit two's
// complement) and re_a*im_b + re_b*im_a computed here with the simulator's
// own arithmetic. The test counts how often each mechanism of the datapath
// is exercised in the 32-bit instance - a negative real part, a
// non-negative real part, a carry out of RCA1 and a carry out of RCA2 inside
// one of the 32x32 multipliers, an imaginary sum that needs bit 2N - and
// fails if any never happened.
module tb_mul_complx32x32;
  int checks = 0;
  int failures = 0;
  int n_neg = 0, n_pos = 0, n_ca1 = 0, n_ca2 = 0, n_imtop = 0;

  logic [7:0]  ra8, ia8, rb8, ib8;
  logic [16:0] rr8, ir8;
  logic [15:0] ra16, ia16, rb16, ib16;
  logic [32:0] rr16, ir16;
  logic [31:0] ra32, ia32, rb32, ib32;
  logic [64:0] rr32, ir32;

  mul_complx32x32 #(.N(8)) dut8 (
    .re_a(ra8), .im_a(ia8), .re_b(rb8), .im_b(ib8), .re_root(rr8), .im_root(ir8));
  mul_complx32x32 #(.N(16)) dut16 (
    .re_a(ra16), .im_a(ia16), .re_b(rb16), .im_b(ib16), .re_root(rr16), .im_root(ir16));
  mul_complx32x32 #(.N(32)) dut32 (
    .re_a(ra32), .im_a(ia32), .re_b(rb32), .im_b(ib32), .re_root(rr32), .im_root(ir32));

  function automatic logic [129:0] model(input int unsigned n, input logic [31:0] ra,
                                         input logic [31:0] ia, input logic [31:0] rb,
                                         input logic [31:0] ib);
    // returns {re, im}, each 65 bits, the real part cut to 2n+1 bits
    logic [64:0] re, im, mask;
    mask = (65'd1 << (2 * n + 1)) - 65'd1;
    re = ((65'(ra) * 65'(rb)) - (65'(ia) * 65'(ib))) & mask;
    im = (65'(ra) * 65'(ib)) + (65'(rb) * 65'(ia));
    return {re, im};
  endfunction

  task automatic report(input string tag, input logic [64:0] got_re, input logic [64:0] got_im,
                        input logic [64:0] exp_re, input logic [64:0] exp_im);
    checks += 2;
    if (got_re !== exp_re) begin
      failures++;
      $display("FAIL %s re_root: got %h, expected %h", tag, got_re, exp_re);
    end
    if (got_im !== exp_im) begin
      failures++;
      $display("FAIL %s im_root: got %h, expected %h", tag, got_im, exp_im);
    end
  endtask

  task automatic run8(input logic [7:0] ra, input logic [7:0] ia, input logic [7:0] rb,
                      input logic [7:0] ib);
    logic [129:0] m;
    ra8 = ra; ia8 = ia; rb8 = rb; ib8 = ib;
    #1;
    m = model(8, 32'(ra), 32'(ia), 32'(rb), 32'(ib));
    report("N=8", 65'(rr8), 65'(ir8), m[129:65], m[64:0]);
  endtask

  task automatic run16(input logic [15:0] ra, input logic [15:0] ia, input logic [15:0] rb,
                       input logic [15:0] ib);
    logic [129:0] m;
    ra16 = ra; ia16 = ia; rb16 = rb; ib16 = ib;
    #1;
    m = model(16, 32'(ra), 32'(ia), 32'(rb), 32'(ib));
    report("N=16", 65'(rr16), 65'(ir16), m[129:65], m[64:0]);
  endtask

  task automatic run32(input logic [31:0] ra, input logic [31:0] ia, input logic [31:0] rb,
                       input logic [31:0] ib);
    logic [129:0] m;
    ra32 = ra; ia32 = ia; rb32 = rb; ib32 = ib;
    #1;
    m = model(32, ra, ia, rb, ib);
    report("N=32", rr32, ir32, m[129:65], m[64:0]);
    if (rr32[64]) n_neg++; else n_pos++;
    if (ir32[64]) n_imtop++;
    if (dut32.u_mul1.ca1 || dut32.u_mul2.ca1 || dut32.u_mul3.ca1 || dut32.u_mul4.ca1) n_ca1++;
    if (dut32.u_mul1.ca2 || dut32.u_mul2.ca2 || dut32.u_mul3.ca2 || dut32.u_mul4.ca2) n_ca2++;
  endtask

  // Published results at fixed operands, checked literally.
  task automatic lit(input string tag, input logic [64:0] got, input logic [64:0] expected);
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL %s: got %h, published %h", tag, got, expected);
    end
  endtask

  initial begin
    // 8-bit reference set
    run8(8'h08, 8'h55, 8'haa, 8'h33);
    lit("8b re 1", 65'(rr8), 65'h1f461);  lit("8b im 1", 65'(ir8), 65'h03a0a);
    run8(8'he3, 8'h0f, 8'h1c, 8'h88);
    lit("8b re 2", 65'(rr8), 65'h010dc);  lit("8b im 2", 65'(ir8), 65'h07a3c);
    run8(8'hcf, 8'h1d, 8'hff, 8'h77);
    lit("8b re 3", 65'(rr8), 65'h0c0b6);  lit("8b im 3", 65'(ir8), 65'h07d1c);
    run8(8'h7f, 8'hf0, 8'hff, 8'h7d);
    lit("8b re 4", 65'(rr8), 65'h00951);  lit("8b im 4", 65'(ir8), 65'h12d13);
    run8(8'h5f, 8'hf0, 8'he7, 8'h6d);
    lit("8b re 5", 65'(rr8), 65'h1ef89);  lit("8b im 5", 65'(ir8), 65'h10103);
    run8(8'h5f, 8'h38, 8'h9f, 8'hdd);
    lit("8b re 6", 65'(rr8), 65'h00aa9);  lit("8b im 6", 65'(ir8), 65'h074cb);

    // 16-bit reference set
    run16(16'h0418, 16'h04fc, 16'h0420, 16'h0580);
    lit("16b re 1", 65'(rr16), 65'h1fff57900);  lit("16b im 1", 65'(ir16), 65'h0002b1380);
    run16(16'hc001, 16'h5550, 16'hc001, 16'h5550);
    lit("16b re 2", 65'(rr16), 65'h073934701);  lit("16b im 2", 65'(ir16), 65'h07ff8aaa0);
    run16(16'haaaa, 16'hffff, 16'h85fe, 16'hf7f8);
    lit("16b re 3", 65'(rr16), 65'h1615c9ea4);  lit("16b im 3", 65'(ir16), 65'h12b4cd4b2);
    run16(16'h74fc, 16'hffff, 16'h7ff0, 16'hfff7);
    lit("16b re 4", 65'(rr16), 65'h13a80b037);  lit("16b im 4", 65'(ir16), 65'h0f4e76334);

    // 32-bit reference set
    run32(32'hf403bf08, 32'h1fe60005, 32'hfff9c040, 32'h19c0bfc5);
    lit("32b re 1", rr32, 65'h0f0c84fc7f03c0327);  lit("32b im 1", ir32, 65'h038714ff119c9ba68);
    run32(32'h80000008, 32'h80000008, 32'h80000008, 32'h80000008);
    lit("32b re 2", rr32, 65'h0);                  lit("32b im 2", ir32, 65'h08000001000000080);

    // corner cases: largest operands, zero, carries inside the multipliers
    run32(32'hffffffff, 32'hffffffff, 32'hffffffff, 32'hffffffff);
    run32(32'h0, 32'hffffffff, 32'h0, 32'hffffffff);
    run32(32'hffffffff, 32'h0, 32'h0002ffff, 32'h0);
    run8(8'hff, 8'hff, 8'hff, 8'hff);
    run16(16'h0, 16'hffff, 16'h0, 16'hffff);

    for (int i = 0; i < 1000; i++) begin
      run8(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
      run16(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
      run32($urandom, $urandom, $urandom, $urandom);
    end

    $display("N=32 mechanisms: negative re %0d, non-negative re %0d, RCA1 carry %0d, RCA2 carry %0d, im bit 64 %0d",
             n_neg, n_pos, n_ca1, n_ca2, n_imtop);
    checks += 5;
    if (n_neg == 0)   begin failures++; $display("FAIL negative real part never occurred"); end
    if (n_pos == 0)   begin failures++; $display("FAIL non-negative real part never occurred"); end
    if (n_ca1 == 0)   begin failures++; $display("FAIL RCA1 carry never occurred"); end
    if (n_ca2 == 0)   begin failures++; $display("FAIL RCA2 carry never occurred"); end
    if (n_imtop == 0) begin failures++; $display("FAIL imaginary carry into bit 64 never occurred"); end

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
