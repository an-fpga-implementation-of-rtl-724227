// tb_control_logic: the control logic is connected to the behavioural NPI
// memory model (with random request and write stalls), to modelled
// differential FIFOs that are full at random, and to modelled core output
// FIFOs.  For each block: every 64-bit word pushed into a channel's FIFO
// must be the next word of that channel's array in memory; after the load
// is reported done, the modelled cores produce ncell results each, and the
// memory must afterwards hold exactly those results, packed two per word, in
// the arrays of the updated field, with the other three arrays and the word
// after the last result unchanged.  done and one irq pulse end each block.
module tb_control_logic;
  import fdtd_pkg::*;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, rst_n = 0, start = 0;
  upd_mode_e mode = MODE_E, run_mode;
  logic [14:0] ncell = 0;
  logic [31:0] base_addr [6];
  logic busy, done, irq;
  phase_e phase;
  logic [5:0]  npi_req_valid, npi_req_ready, npi_req_rnw;
  logic [31:0] npi_req_addr [6];
  logic [5:0]  npi_req_beats [6];
  logic [5:0]  npi_rd_empty, npi_rd_pop, npi_wr_push, npi_wr_full;
  logic [63:0] npi_rd_data [6], npi_wr_data [6];
  logic [7:0]  npi_wr_be [6];
  logic [5:0]  df_wr_en, df_full;
  logic [63:0] df_wr_data [6];
  logic        load_done = 0, core_idle = 1;
  logic [2:0]  co_empty, co_rd_en;
  fp32_t       co_data [3];
  int checks = 0, failures = 0, nirq = 0;
  int got [6];
  fp32_t res [3][$];
  fp32_t res_all [3][$];
  logic co_avail [3];

  control_logic dut (.*);
  npi_mem_model #(.WORDS(65536), .STALL(1'b1)) u_mem (
    .clk, .req_valid(npi_req_valid), .req_ready(npi_req_ready), .req_rnw(npi_req_rnw),
    .req_addr(npi_req_addr), .req_beats(npi_req_beats),
    .rd_empty(npi_rd_empty), .rd_pop(npi_rd_pop), .rd_data(npi_rd_data),
    .wr_push(npi_wr_push), .wr_data(npi_wr_data), .wr_be(npi_wr_be), .wr_full(npi_wr_full)
  );
  always #2.5 clk = ~clk;

  always @(negedge clk) begin
    for (int c = 0; c < 6; c++) df_full[c] <= ($urandom % 4 == 0);
    for (int c = 0; c < 3; c++) co_avail[c] <= ($urandom % 3 != 0);
  end
  always_comb
    for (int c = 0; c < 3; c++) begin
      co_empty[c] = !co_avail[c] || res[c].size() == 0;
      co_data[c]  = res[c].size() ? res[c][0] : 32'd0;
    end

  always @(posedge clk) begin
    if (irq) nirq++;
    for (int c = 0; c < 6; c++)
      if (df_wr_en[c]) begin
        checks++;
        if (df_full[c] || df_wr_data[c] != u_mem.mem[(base_addr[c] >> 3) + 32'(got[c])]) begin
          failures++;
          if (failures < 10) $display("FAIL ch %0d word %0d: %h", c, got[c], df_wr_data[c]);
        end
        got[c]++;
      end
    for (int c = 0; c < 3; c++) if (co_rd_en[c]) void'(res[c].pop_front());
  end

  task automatic run(input int n, input upd_mode_e m);
    logic [63:0] old_w [6][$];
    int nb;
    nb = (n + 1) / 2;
    for (int c = 0; c < 6; c++) begin
      base_addr[c] = 32'(c) * 32'h1_0000 + 32'($urandom % 16) * 32'h800;
      got[c] = 0;
      old_w[c].delete();
      for (int w = 0; w <= nb; w++) begin
        u_mem.mem[(base_addr[c] >> 3) + 32'(w)] = {$urandom, $urandom};
        old_w[c].push_back(u_mem.mem[(base_addr[c] >> 3) + 32'(w)]);
      end
    end
    @(negedge clk);
    ncell = 15'(n); mode = m; start = 1;
    @(negedge clk);
    start = 0;
    wait (phase == PH_LOAD);
    // the load is complete once every channel delivered all its words
    wait (got[0] == nb && got[1] == nb && got[2] == nb && got[3] == nb && got[4] == nb && got[5] == nb);
    repeat (3) @(negedge clk);
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (got[c] != nb) failures++;
    end
    load_done = 1;
    wait (phase == PH_COMPUTE);
    load_done = 0;
    for (int c = 0; c < 3; c++) begin
      res_all[c].delete();
      for (int w = 0; w < n; w++) begin
        fp32_t v;
        v = $urandom;
        res[c].push_back(v);
        res_all[c].push_back(v);
      end
    end
    wait (done);
    repeat (4) @(negedge clk);
    for (int c = 0; c < 6; c++) begin
      bit upd;
      upd = (m == MODE_E) ? (c < 3) : (c >= 3);
      for (int w = 0; w <= nb; w++) begin
        logic [63:0] e, g;
        g = u_mem.mem[(base_addr[c] >> 3) + 32'(w)];
        e = old_w[c][w];
        if (upd && w < nb) begin
          int cc;
          cc = (m == MODE_E) ? c : c - 3;
          e[31:0] = res_all[cc][2*w];
          if (2*w + 1 < n) e[63:32] = res_all[cc][2*w+1];
        end
        checks++;
        if (g != e) begin
          failures++;
          if (failures < 10) $display("FAIL wb ch %0d word %0d: %h expected %h", c, w, g, e);
        end
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 6; c++) base_addr[c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(60, MODE_E);
    run(27, MODE_H);
    run(301, MODE_E);
    checks++;
    if (nirq != 3) begin failures++; $display("FAIL %0d interrupts", nirq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
