// tb_write_logic: six modelled FIFOs deliver random words with random gaps;
// every bank write is checked to carry the channel's next word to the next
// sequential address, and exactly ncell words reach each bank.  Runs with an
// even and an odd cell count (the odd one must drop the spare upper half of
// the last 64-bit word).  done must rise once all banks are full, and with
// words always available a channel must write one word per clock.
module tb_write_logic;
  import fdtd_pkg::*;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, rst_n = 0, load_en = 0;
  logic [14:0] ncell = 0;
  logic [5:0] f_empty, f_rd_en, b_we;
  fp32_t f_data [6], b_wdata [6];
  logic [13:0] b_addr [6];
  logic done;
  int checks = 0, failures = 0;
  logic [31:0] q [6][$];
  int written [6];
  int gap_pct = 50;

  write_logic #(.NCH(6), .AW(14)) dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int c = 0; c < 6; c++) f_data[c] = q[c].size() ? q[c][0] : 32'd0;

  logic [5:0] avail;
  always @(negedge clk)
    for (int c = 0; c < 6; c++) avail[c] <= ($urandom % 100 >= gap_pct);
  assign f_empty = ~avail | {(q[5].size() == 0), (q[4].size() == 0), (q[3].size() == 0),
                             (q[2].size() == 0), (q[1].size() == 0), (q[0].size() == 0)};

  always @(posedge clk) begin
    for (int c = 0; c < 6; c++) begin
      if (b_we[c]) begin
        checks++;
        if (b_addr[c] != 14'(written[c]) || b_wdata[c] != q[c][0]) begin
          failures++;
          if (failures < 10) $display("FAIL ch %0d addr %0d data %h", c, b_addr[c], b_wdata[c]);
        end
        written[c]++;
      end
      if (f_rd_en[c]) void'(q[c].pop_front());
    end
  end

  task automatic run(input int n, input int gaps);
    int t0;
    gap_pct = gaps;
    for (int c = 0; c < 6; c++) begin
      written[c] = 0;
      for (int w = 0; w < n + (n % 2); w++) q[c].push_back($urandom);
    end
    @(negedge clk);
    ncell = 15'(n);
    load_en = 1;
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (written[c] != n || q[c].size() != 0) begin
        failures++;
        $display("FAIL ch %0d wrote %0d of %0d, %0d left", c, written[c], n, q[c].size());
      end
    end
    checks++;
    if (gaps == 0 && t0 > n + n % 2 + 3) begin
      failures++;
      $display("FAIL %0d clocks for %0d words", t0, n);
    end
    load_en = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(100, 40);
    run(37, 60);
    run(500, 0);
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
