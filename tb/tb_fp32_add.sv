// tb_fp32_add -- self-checking test of fp32_add against a double-precision
// reference rounded to single precision (fp_ref_pkg). Random normal operands
// over a wide exponent range, plus zeros, equal magnitudes of opposite sign
// mantissas that round up into the next binade, and short significands
// whose exact results often sit on a rounding tie.
module tb_fp32_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_;
    #1;
    exp_y = fadd(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h add %h: got %h want %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) check_one(rand_f(40, 200), rand_f(40, 200));
    for (int n = 0; n < 20000; n++) check_one(rand_f(120, 135), rand_f(120, 135));
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] r;
      r = rand_f(60, 190);
      check_one(r, 32'd0);
      check_one(32'h8000_0000, r);
      check_one(r, {~r[31], r[30:0]});
      check_one(r, {r[31], r[30:23], 23'h7FFFFF});
      check_one({r[31], r[30:23], 23'h7FFFFF}, {r[31], r[30:23] - 8'd24, 23'h7FFFFF});
    end
    // short significands: exact products and sums often fall on a rounding tie
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] p, q;
      p = rand_f(110, 140); p[10:0] = '0;
      q = rand_f(110, 140); q[10:0] = '0;
      if (n % 2 == 1) q[30:23] = p[30:23] - 8'($urandom % 26);
      check_one(p, q);
    end
    check_one(32'h3F80_0000, 32'h3F80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
