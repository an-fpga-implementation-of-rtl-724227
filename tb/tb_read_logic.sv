// tb_read_logic: the read logic scans a block held in six modelled BRAM
// banks (one-clock read latency on both ports).  Every operand set pushed to
// each of the three cores is compared with the operands the curl equations
// call for at that cell (E mode: forward neighbours of H; H mode: backward
// neighbours of E; a cell on a last plane in E mode, or on a first plane
// in H mode, gets equal operands so that its differences are zero).  The modelled cores
// drain their operand FIFOs at random rates so the read logic must stall;
// without stalls the block must take two clocks per cell (the document's
// rate).
module tb_read_logic;
  import fdtd_pkg::*;
  timeunit 1ns; timeprecision 100ps;
  localparam int AW = 10;
  localparam int N  = 1024;
  logic clk = 0, rst_n = 0, run_en = 0;
  upd_mode_e mode;
  block_geom_t geom;
  logic [AW-1:0] p0_addr;
  logic [AW-1:0] p1_addr [6];
  fp32_t p0_data [6], p1_data [6];
  logic [5:0] core_count [NCORE];
  logic [NCORE-1:0] core_push;
  core_ops_t core_ops [NCORE];
  logic done;
  fp32_t bank [6][N];
  core_ops_t got [NCORE][$];
  int checks = 0, failures = 0, drain_pct = 100, stalls = 0;
  int ip, kp, jp;

  read_logic #(.AW(AW), .FIFO_DEPTH(32)) dut (
    .clk, .rst_n, .run_en, .mode, .geom, .p0_addr, .p1_addr, .p0_data, .p1_data,
    .core_count, .core_push, .core_ops, .done
  );
  always #5 clk = ~clk;

  // banks and modelled core FIFO levels
  always @(posedge clk) begin
    for (int b = 0; b < 6; b++) begin
      p0_data[b] <= bank[b][p0_addr];
      p1_data[b] <= bank[b][p1_addr[b]];
    end
    for (int c = 0; c < int'(NCORE); c++) begin
      logic dr;
      dr = (core_count[c] != 0) && ($urandom % 100 < drain_pct);
      core_count[c] <= core_count[c] + 6'(rst_n && core_push[c]) - 6'(dr);
      if (rst_n && core_push[c]) got[c].push_back(core_ops[c]);
    end
    if (run_en && !dut.room) stalls++;
  end

  function automatic int idx(int i, int j, int k);
    return (j * kp + k) * ip + i;
  endfunction

  function automatic core_ops_t expect_ops(bit h, int c, int i, int j, int k);
    core_ops_t o;
    int n;
    bit hold;
    n = idx(i, j, k);
    if (!h) begin
      // banks 0..2 = Ex,Ey,Ez; 3..5 = Hx,Hy,Hz
      case (c)
        0: begin hold = (i == ip-1 || j == jp-1 || k == kp-1);
           o = '{a: bank[5][hold ? n : idx(i,j+1,k)], b: bank[5][n], c: bank[4][hold ? n : idx(i,j,k+1)], d: bank[4][n], f: bank[0][n]}; end
        1: begin hold = (i == ip-1 || j == jp-1 || k == kp-1);
           o = '{a: bank[3][hold ? n : idx(i,j,k+1)], b: bank[3][n], c: bank[5][hold ? n : idx(i+1,j,k)], d: bank[5][n], f: bank[1][n]}; end
        default: begin hold = (i == ip-1 || j == jp-1 || k == kp-1);
           o = '{a: bank[4][hold ? n : idx(i+1,j,k)], b: bank[4][n], c: bank[3][hold ? n : idx(i,j+1,k)], d: bank[3][n], f: bank[2][n]}; end
      endcase
    end else begin
      case (c)
        0: begin hold = (i == 0 || j == 0 || k == 0);
           o = '{a: bank[1][n], b: bank[1][hold ? n : idx(i,j,k-1)], c: bank[2][n], d: bank[2][hold ? n : idx(i,j-1,k)], f: bank[3][n]}; end
        1: begin hold = (i == 0 || j == 0 || k == 0);
           o = '{a: bank[2][n], b: bank[2][hold ? n : idx(i-1,j,k)], c: bank[0][n], d: bank[0][hold ? n : idx(i,j,k-1)], f: bank[4][n]}; end
        default: begin hold = (i == 0 || j == 0 || k == 0);
           o = '{a: bank[0][n], b: bank[0][hold ? n : idx(i,j-1,k)], c: bank[1][n], d: bank[1][hold ? n : idx(i-1,j,k)], f: bank[5][n]}; end
      endcase
    end
    return o;
  endfunction

  task automatic run(input int i_n, input int k_n, input int j_n, input bit h, input int drain);
    int t;
    ip = i_n; kp = k_n; jp = j_n;
    for (int b = 0; b < 6; b++) for (int n = 0; n < N; n++) bank[b][n] = $urandom;
    drain_pct = drain;
    @(negedge clk);
    geom = '{ipts: CELL_AW'(ip), kpts: CELL_AW'(kp), djpts: CELL_AW'(jp)};
    mode = h ? MODE_H : MODE_E;
    run_en = 1;
    t = 0;
    while (!done) begin @(negedge clk); t++; end
    for (int c = 0; c < int'(NCORE); c++) begin
      checks++;
      if (got[c].size() != ip * kp * jp) begin
        failures++;
        $display("FAIL core %0d got %0d operand sets", c, got[c].size());
      end
    end
    for (int j = 0; j < jp; j++) for (int k = 0; k < kp; k++) for (int i = 0; i < ip; i++)
      for (int c = 0; c < int'(NCORE); c++) begin
        core_ops_t e, g;
        e = expect_ops(h, c, i, j, k);
        g = (got[c].size() != 0) ? got[c].pop_front() : '0;
        checks++;
        if (g != e) begin
          failures++;
          if (failures < 10) $display("FAIL %s core %0d cell (%0d,%0d,%0d): got %h exp %h", h ? "H" : "E", c, i, j, k, g, e);
        end
      end
    checks++;
    if (drain == 100 && (t < 2 * ip * kp * jp || t > 2 * ip * kp * jp + 4)) begin
      failures++;
      $display("FAIL %0d clocks for %0d cells", t, ip * kp * jp);
    end
    run_en = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < int'(NCORE); c++) core_count[c] = 0;
    geom = '0; mode = MODE_E;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 4, 6, 1'b0, 100);
    run(5, 4, 6, 1'b1, 100);
    run(7, 3, 9, 1'b0, 20);
    run(6, 5, 4, 1'b1, 25);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
