// tb_fp32_mul: self-checking testbench for fp32_mul.
// Random normal operands with exponents kept away from overflow and
// underflow are multiplied and compared bit for bit with fp_ref_pkg (the
// double-precision product of two floats is exact, so one rounding to
// float gives the IEEE result).
// Special operands (zero, infinity, NaN) are checked against fixed values.
// The one-cycle latency is checked on every operation.
module tb_fp32_mul;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  fp32_t a = 0, b = 0;
  logic out_valid;
  fp32_t p;
  int checks = 0, failures = 0;

  fp32_mul dut (.*);

  always #5 clk = ~clk;

  function automatic fp32_t rnd_fp();
    logic [7:0] e;
    e = 8'(100 + ($urandom % 55));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic check(input fp32_t x, input fp32_t y, input fp32_t exp_p);
    @(negedge clk);
    a = x; b = y; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || p !== exp_p) begin
      failures++;
      $display("FAIL mul %h * %h = %h (valid %0d), expected %h", x, y, p, out_valid, exp_p);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(32'h3FC0_0000, 32'h4000_0000, 32'h4040_0000);  // 1.5*2 = 3
    check(32'h0000_0000, 32'h4000_0000, 32'h0000_0000);
    check(32'h7F80_0000, 32'hC000_0000, 32'hFF80_0000);  // inf * -2
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);  // inf * 0
    check(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);  // overflow
    check(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);  // underflow
    for (int n = 0; n < 2000; n++) begin
      fp32_t x, y;
      x = rnd_fp();
      y = rnd_fp();
      check(x, y, fmul(x, y));
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
