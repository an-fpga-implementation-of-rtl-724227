// tb_async_fifo: a 32 x 32 async_fifo between a 200 MHz writer and a 100 MHz
// reader with unrelated phase.  Every word read is compared with a queue
// model of what was written; the writer obeys full, the reader obeys empty.
// Bursty traffic drives the FIFO to full and to empty; wr_count is checked
// never to be below the number of words actually held.
module tb_async_fifo;
  timeunit 1ns; timeprecision 100ps;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wr_data = 0, rd_data;
  logic [5:0] wr_count;
  int checks = 0, failures = 0, nread = 0, saw_full = 0;
  logic [31:0] q [$];

  async_fifo #(.WIDTH(32), .DEPTH(32)) dut (.*);
  always #2.5 wclk = ~wclk;
  initial begin #1.7; forever #5 rclk = ~rclk; end

  // writer
  initial begin
    repeat (3) @(negedge wclk);
    wrst_n = 1; rrst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge wclk);
      if (full) saw_full++;
      wr_en   = !full && ($urandom % 100 < ((cyc / 500) % 2 ? 20 : 95));
      wr_data = $urandom;
      @(posedge wclk);
      if (wr_en) q.push_back(wr_data);
      checks++;
      if (32'(wr_count) + 1 < 32'(q.size())) failures++;
    end
    wr_en = 0;
  end

  // reader
  initial begin
    repeat (3) @(negedge rclk);
    forever begin
      @(negedge rclk);
      rd_en = !empty && ($urandom % 100 < 70);
      if (rd_en) begin
        checks++;
        if (q.size() == 0 || rd_data != q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL read %h expected %h", rd_data, q.size() ? q[0] : 0);
        end
      end
      @(posedge rclk);
      if (rd_en) begin void'(q.pop_front()); nread++; end
    end
  end

  initial begin
    #45us;
    checks++;
    if (saw_full == 0 || nread < 1000) failures++;
    $display("read %0d words, full seen %0d clocks", nread, saw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
