// tb_sync_fifo: random pushes and pops on a 32 x 32 sync_fifo, compared
// against a queue model: head data, count, empty and full on every clock.
// The producer respects full and the consumer respects empty; a phase of
// pushes only drives the FIFO to full, a phase of pops only to empty.
module tb_sync_fifo;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [5:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int saw_full = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int pw, pr;
      @(negedge clk);
      // compare state
      checks++;
      if (count != 6'(q.size()) || empty != (q.size() == 0) || full != (q.size() == 32) ||
          (q.size() > 0 && rd_data != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d count %0d model %0d", cyc, count, q.size());
      end
      if (full) saw_full++;
      pw = (cyc % 1000 < 300) ? 90 : (cyc % 1000 < 600) ? 10 : 50;
      pr = 100 - pw;
      wr_en   = !full && ($urandom % 100 < pw);
      rd_en   = !empty && ($urandom % 100 < pr);
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++;
    if (saw_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
