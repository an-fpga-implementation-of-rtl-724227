// tb_field_compute_core: random operand sets are pushed into the core's
// five operand FIFOs; each result read from the output FIFO (in a second,
// faster clock) is compared bit for bit with
// F + C1*(a-b) - C2*(c-d) evaluated by the reference arithmetic.  The
// reader stalls for long stretches so the output FIFO fills and the core
// must stop issuing; results must stay in order.  With a free reader the
// core must accept one operand set per clock (checked over 200 sets), and
// a single update must reach the output FIFO within a fixed latency.
module tb_field_compute_core;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, oclk = 0, rst_n = 0, orst_n = 0;
  logic in_valid = 0, out_rd_en = 0, out_empty, busy;
  core_ops_t in_ops;
  logic [5:0] in_count;
  fp32_t c1, c2, out_data;
  int checks = 0, failures = 0, nres = 0, npush = 0;
  fp32_t q [$];
  int rd_pct = 80;

  field_compute_core #(.FIFO_DEPTH(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin #0.9; forever #2.5 oclk = ~oclk; end

  function automatic fp32_t rnd_fp();
    logic [7:0] e;
    e = 8'(118 + ($urandom % 12));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic push_one();
    in_ops = '{a: rnd_fp(), b: rnd_fp(), c: rnd_fp(), d: rnd_fp(), f: rnd_fp()};
    if ($urandom % 8 == 0) in_ops.b = in_ops.a;     // zero difference
    in_valid = 1;
    npush++;
    q.push_back(fadd(in_ops.f, fsub(fmul(c1, fsub(in_ops.a, in_ops.b)),
                                    fmul(c2, fsub(in_ops.c, in_ops.d)))));
  endtask

  // reader
  always @(negedge oclk) begin
    out_rd_en <= 1'b0;
    if (!out_empty && ($urandom % 100 < rd_pct)) begin
      out_rd_en <= 1'b1;
      checks++;
      if (q.size() == 0 || out_data != q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL result %h expected %h", out_data, q.size() ? q[0] : 0);
      end
    end
  end
  always @(posedge oclk) if (out_rd_en) begin void'(q.pop_front()); nres++; end

  initial begin
    int t, lat;
    c1 = 32'h3F00_0000; c2 = 32'hBE80_0000;
    repeat (3) @(negedge clk);
    rst_n = 1; orst_n = 1;
    // latency of a single update: pushed at clock 1, popped from the
    // operand FIFOs at clock 2, in the output FIFO at clock 6 (4 stages)
    rd_pct = 0;
    @(negedge clk);
    push_one();
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (dut.o_wr_count == 0) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 6) begin failures++; $display("FAIL latency %0d clocks", lat); end
    rd_pct = 100;
    repeat (20) @(negedge clk);
    // throughput with a free reader
    t = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = 0;
      if (in_count < 30) push_one();
      else n--;
      t++;
    end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (t > 210) begin failures++; $display("FAIL %0d clocks for 200 updates", t); end
    // random values, slow reader (coefficients change only when idle)
    repeat (20) @(negedge clk);
    c1 = rnd_fp(); c2 = rnd_fp();
    rd_pct = 5;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = 0;
      if (n == 1000) rd_pct = 60;
      if (in_count < 30 && $urandom % 2) push_one();
    end
    @(negedge clk);
    in_valid = 0;
    rd_pct = 100;
    repeat (500) @(negedge clk);
    checks++;
    if (q.size() != 0 || nres != npush) begin
      failures++;
      $display("FAIL %0d results outstanding, %0d read", q.size(), nres);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
