// tb_fp32_add: self-checking testbench for fp32_add.
// Random normal operands whose exponents differ by little enough that their
// double-precision sum is exact are added and subtracted, and the result is
// compared bit for bit with the reference rounding (fp_ref_pkg) of
// that sum.  Cancellation, signed zeros, infinities and NaN are checked
// against fixed values.  The one-cycle latency is checked on every
// operation.
module tb_fp32_add;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, sub = 0;
  fp32_t a = 0, b = 0;
  logic out_valid;
  fp32_t s;
  int checks = 0, failures = 0;

  fp32_add dut (.*);

  always #5 clk = ~clk;

  function automatic fp32_t rnd_fp(input int base);
    logic [7:0] e;
    e = 8'(base + ($urandom % 24));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic check(input fp32_t x, input fp32_t y, input logic sb, input fp32_t exp_s);
    @(negedge clk);
    a = x; b = y; sub = sb; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || s !== exp_s) begin
      failures++;
      $display("FAIL add %h %s %h = %h (valid %0d), expected %h", x, sb ? "-" : "+", y, s, out_valid, exp_s);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(32'h3F80_0000, 32'h3F80_0000, 0, 32'h4000_0000);  // 1+1
    check(32'h4040_0000, 32'h3F80_0000, 1, 32'h4000_0000);  // 3-1
    check(32'h3F80_0000, 32'h3F80_0000, 1, 32'h0000_0000);  // 1-1 = +0
    check(32'h8000_0000, 32'h0000_0000, 1, 32'h8000_0000);  // -0 - +0 = -0
    check(32'h7F80_0000, 32'h7F80_0000, 1, 32'h7FC0_0000);  // inf-inf
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0, 32'h7F80_0000);  // overflow
    check(32'h3F80_0000, 32'h3380_0000, 0, 32'h3F80_0000);  // 1 + 2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 0, 32'h3F80_0002);  // tie rounds up to even
    for (int n = 0; n < 4000; n++) begin
      fp32_t x, y;
      logic  sb;
      x  = rnd_fp(110);
      y  = rnd_fp(110);
      sb = 1'($urandom);
      check(x, y, sb, sb ? fsub(x, y) : fadd(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
