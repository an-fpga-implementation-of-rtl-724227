// tb_diff_fifo: 64-bit words pushed at 200 MHz come out of diff_fifo as
// 32-bit words at 100 MHz, low half first.  Every 32-bit word is compared
// with a model; the writer fills the FIFO to full (32 entries) and the
// reader drains it.  The drain rate is checked: with data waiting, one
// 32-bit word leaves per read clock.
module tb_diff_fifo;
  timeunit 1ns; timeprecision 100ps;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [63:0] wr_data = 0;
  logic [31:0] rd_data;
  logic [5:0] wr_count;
  int checks = 0, failures = 0, nread = 0, saw_full = 0;
  logic [31:0] q [$];

  diff_fifo #(.DEPTH(32)) dut (.*);
  always #2.5 wclk = ~wclk;
  initial begin #1.1; forever #5 rclk = ~rclk; end

  initial begin
    repeat (3) @(negedge wclk);
    wrst_n = 1; rrst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge wclk);
      while (full) begin saw_full++; @(negedge wclk); end
      wr_en   = 1;
      wr_data = {$urandom, $urandom};
      @(posedge wclk);
      q.push_back(wr_data[31:0]);
      q.push_back(wr_data[63:32]);
      @(negedge wclk);
      wr_en = 0;
    end
  end

  initial begin
    // let the writer fill the FIFO first
    #600ns;
    forever begin
      @(negedge rclk);
      rd_en = !empty;
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
    #20us;
    checks++;
    if (saw_full == 0 || nread != 800) begin
      failures++;
      $display("FAIL read %0d of 800 words, full seen %0d", nread, saw_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
