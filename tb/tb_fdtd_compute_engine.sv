// tb_fdtd_compute_engine: end-to-end testbench of the FDTD field compute
// engine at its default parameters (64 KB banks, 32-deep FIFOs).
//
// The six field arrays of a block are placed in a behavioural DDR2/NPI
// model, the engine is started, and after its interrupt the three updated
// arrays are read back from the model and compared bit for bit with a
// reference update computed here from the curl equations (E from forward
// differences of H, H from backward differences of E; in E mode cells on a
// last plane, in H mode cells on a first plane, unchanged), using the
// reference single-precision arithmetic of fp_ref_pkg.  The untouched arrays
// are checked to be unchanged.
//
// Runs: small blocks in E and H mode, an odd cell count (half-filled last
// memory word), a run with heavy write-back stalls so the cores' operand
// FIFOs fill and the read logic must stall, and a full 16384-cell block
// (32 x 32 x 16) in both modes.  The testbench counts how often each
// mechanism occurred (load and compute phases, gated clock cycles, NPI
// stalls, read-logic stalls, held boundary components, partial last word,
// multi-burst transfers, interrupts) and fails any that never did.  The
// compute phase must take at least two core clocks per cell (the
// document's rate) and is checked not to exceed three per cell without
// stalls.
module tb_fdtd_compute_engine;
  timeunit 1ns;
  timeprecision 100ps;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N_MAX  = 16384;
  localparam int unsigned MWORDS = 65536;

  logic clk_npi = 0, clk_core = 0, rst_n = 0;
  logic start = 0, mode = 0;
  block_geom_t geom;
  logic [31:0] base_addr [6];
  fp32_t coef [6];
  logic busy, done, irq;
  logic [5:0]  npi_req_valid, npi_req_ready, npi_req_rnw;
  logic [31:0] npi_req_addr [6];
  logic [5:0]  npi_req_beats [6];
  logic [5:0]  npi_rd_empty, npi_rd_pop, npi_wr_push, npi_wr_full;
  logic [63:0] npi_rd_data [6], npi_wr_data [6];
  logic [7:0]  npi_wr_be [6];

  int checks = 0, failures = 0;

  always #2.5 clk_npi = ~clk_npi;
  initial begin
    #1.3;
    forever #5 clk_core = ~clk_core;
  end

  fdtd_compute_engine dut (.*);

  npi_mem_model #(.WORDS(MWORDS), .STALL(1'b1)) u_mem (
    .clk(clk_npi),
    .req_valid(npi_req_valid), .req_ready(npi_req_ready), .req_rnw(npi_req_rnw),
    .req_addr(npi_req_addr), .req_beats(npi_req_beats),
    .rd_empty(npi_rd_empty), .rd_pop(npi_rd_pop), .rd_data(npi_rd_data),
    .wr_push(npi_wr_push), .wr_data(npi_wr_data), .wr_be(npi_wr_be), .wr_full(npi_wr_full)
  );

  // ---------------- mechanism counters ----------------
  int n_load = 0, n_compute = 0, n_irq = 0, n_rl_gated = 0, n_wl_gated = 0, n_df_gated = 0;
  int n_rl_stall = 0, n_partial = 0, n_multiburst = 0, n_hold = 0, n_mode_e = 0, n_mode_h = 0;
  phase_e last_phase = PH_IDLE;
  int core_cycles = 0;
  logic counting = 0;

  always @(posedge clk_npi) begin
    if (dut.phase != last_phase) begin
      if (dut.phase == PH_LOAD)    n_load++;
      if (dut.phase == PH_COMPUTE) n_compute++;
    end
    last_phase <= dut.phase;
    if (irq) n_irq++;
    if (!dut.u_cg_df.en_q) n_df_gated++;
    for (int c = 0; c < 6; c++)
      if (npi_wr_push[c] && npi_wr_be[c] == 8'h0F) n_partial++;
  end

  always @(posedge clk_core) begin
    if (!dut.u_cg_rl.en_q) n_rl_gated++;
    if (!dut.u_cg_wl.en_q) n_wl_gated++;
    if (dut.u_rl.run_en && !dut.u_rl.finished && !dut.u_rl.ph_b && !dut.u_rl.room) n_rl_stall++;
    if (counting) core_cycles++;
  end

  // ---------------- reference model ----------------
  fp32_t fe [3][N_MAX];    // Ex, Ey, Ez
  fp32_t fh [3][N_MAX];    // Hx, Hy, Hz
  fp32_t exp_v [3][N_MAX];
  int ip, kp, jp;

  function automatic int idx(int i, int j, int k);
    return (j * kp + k) * ip + i;
  endfunction

  function automatic fp32_t rnd_fp();
    logic [7:0] e;
    e = 8'(118 + ($urandom % 12));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // F + C1*(a-b) - C2*(c-d), in the order the equations are written
  function automatic fp32_t upd(fp32_t f, fp32_t c1, fp32_t a, fp32_t b, fp32_t c2, fp32_t c, fp32_t d);
    return fadd(f, fsub(fmul(c1, fsub(a, b)), fmul(c2, fsub(c, d))));
  endfunction

  task automatic reference(input bit is_h);
    for (int j = 0; j < jp; j++)
      for (int k = 0; k < kp; k++)
        for (int i = 0; i < ip; i++) begin
          int n;
          n = idx(i, j, k);
          if (!is_h) begin
            // Ex: C1 (Hz[j+1]-Hz) - C2 (Hy[k+1]-Hy)
            if (i == ip-1 || j == jp-1 || k == kp-1) begin exp_v[0][n] = fe[0][n]; n_hold++; end
            else exp_v[0][n] = upd(fe[0][n], coef[0], fh[2][idx(i,j+1,k)], fh[2][n], coef[1], fh[1][idx(i,j,k+1)], fh[1][n]);
            // Ey: C3 (Hx[k+1]-Hx) - C4 (Hz[i+1]-Hz)
            if (i == ip-1 || j == jp-1 || k == kp-1) begin exp_v[1][n] = fe[1][n]; n_hold++; end
            else exp_v[1][n] = upd(fe[1][n], coef[2], fh[0][idx(i,j,k+1)], fh[0][n], coef[3], fh[2][idx(i+1,j,k)], fh[2][n]);
            // Ez: C5 (Hy[i+1]-Hy) - C6 (Hx[j+1]-Hx)
            if (i == ip-1 || j == jp-1 || k == kp-1) begin exp_v[2][n] = fe[2][n]; n_hold++; end
            else exp_v[2][n] = upd(fe[2][n], coef[4], fh[1][idx(i+1,j,k)], fh[1][n], coef[5], fh[0][idx(i,j+1,k)], fh[0][n]);
          end else begin
            // Hx: D1 (Ey-Ey[k-1]) - D2 (Ez-Ez[j-1])
            if (i == 0 || j == 0 || k == 0) begin exp_v[0][n] = fh[0][n]; n_hold++; end
            else exp_v[0][n] = upd(fh[0][n], coef[0], fe[1][n], fe[1][idx(i,j,k-1)], coef[1], fe[2][n], fe[2][idx(i,j-1,k)]);
            // Hy: D3 (Ez-Ez[i-1]) - D4 (Ex-Ex[k-1])
            if (i == 0 || j == 0 || k == 0) begin exp_v[1][n] = fh[1][n]; n_hold++; end
            else exp_v[1][n] = upd(fh[1][n], coef[2], fe[2][n], fe[2][idx(i-1,j,k)], coef[3], fe[0][n], fe[0][idx(i,j,k-1)]);
            // Hz: D5 (Ex-Ex[j-1]) - D6 (Ey-Ey[i-1])
            if (i == 0 || j == 0 || k == 0) begin exp_v[2][n] = fh[2][n]; n_hold++; end
            else exp_v[2][n] = upd(fh[2][n], coef[4], fe[0][n], fe[0][idx(i,j-1,k)], coef[5], fe[1][n], fe[1][idx(i-1,j,k)]);
          end
        end
  endtask

  function automatic fp32_t mem_word(int f, int n);
    logic [63:0] w;
    w = u_mem.mem[(base_addr[f] >> 3) + 32'(n / 2)];
    return (n % 2 == 0) ? w[31:0] : w[63:32];
  endfunction

  task automatic put_word(int f, int n, fp32_t v);
    int a;
    a = int'(base_addr[f] >> 3) + n / 2;
    if (n % 2 == 0) u_mem.mem[a][31:0] = v;
    else            u_mem.mem[a][63:32] = v;
  endtask

  // one block: fill memory, run the engine, compare
  task automatic run_block(input int i_n, input int k_n, input int j_n, input bit is_h,
                           input bit fresh, input int wstall);
    int ncell, t0_reads, err0;
    ip = i_n; kp = k_n; jp = j_n;
    ncell = ip * kp * jp;
    if (fresh) begin
      for (int n = 0; n < ncell; n++)
        for (int c = 0; c < 3; c++) begin
          fe[c][n] = rnd_fp();
          fh[c][n] = rnd_fp();
          put_word(c, n, fe[c][n]);
          put_word(c + 3, n, fh[c][n]);
        end
    end
    for (int c = 0; c < 6; c++) coef[c] = {1'($urandom), 8'(124 + $urandom % 4), 23'($urandom)};
    reference(is_h);
    u_mem.wstall_pct = wstall;
    t0_reads = int'(u_mem.reads);
    err0 = failures;
    @(negedge clk_npi);
    geom  = '{ipts: CELL_AW'(ip), kpts: CELL_AW'(kp), djpts: CELL_AW'(jp)};
    mode  = is_h;
    start = 1;
    @(negedge clk_npi);
    start = 0;
    wait (dut.phase == PH_COMPUTE);
    counting = 1;
    wait (dut.u_rl.finished);
    counting = 0;
    wait (done);
    repeat (3) @(posedge clk_npi);
    // rate: two core clocks per cell at best (document); without stalls
    // the engine must stay close to that
    checks++;
    if (core_cycles < 2 * ncell || (wstall == 0 && core_cycles > 3 * ncell + 20)) begin
      failures++;
      $display("FAIL rate: %0d core clocks for %0d cells", core_cycles, ncell);
    end
    core_cycles = 0;
    if (int'(u_mem.reads) - t0_reads > 6) n_multiburst++;
    if (is_h) n_mode_h++; else n_mode_e++;
    // compare the updated field and the untouched one
    for (int n = 0; n < ncell; n++)
      for (int c = 0; c < 3; c++) begin
        fp32_t got_u, got_s, src_v;
        got_u = mem_word(is_h ? c + 3 : c, n);
        got_s = mem_word(is_h ? c : c + 3, n);
        src_v = is_h ? fe[c][n] : fh[c][n];
        checks += 2;
        if (got_u !== exp_v[c][n]) begin
          failures++;
          if (failures - err0 < 10)
            $display("FAIL %s%0d cell %0d: got %h expected %h", is_h ? "H" : "E", c, n, got_u, exp_v[c][n]);
        end
        if (got_s !== src_v) failures++;
        if (is_h) fh[c][n] = exp_v[c][n];
        else      fe[c][n] = exp_v[c][n];
      end
    $display("block %0dx%0dx%0d %s: %0d cells checked, failures so far %0d",
             ip, jp, kp, is_h ? "H" : "E", ncell, failures);
  endtask

  initial begin
    for (int c = 0; c < 6; c++) base_addr[c] = 32'(c) * 32'h1_0000;
    geom = '0;
    for (int c = 0; c < 6; c++) coef[c] = '0;
    repeat (5) @(negedge clk_npi);
    rst_n = 1;
    repeat (5) @(negedge clk_npi);
    run_block(5, 4, 3, 1'b0, 1'b1, 33);     // small, E
    run_block(5, 4, 3, 1'b1, 1'b0, 33);     // same block, H
    run_block(3, 3, 3, 1'b0, 1'b1, 0);      // odd cell count
    run_block(8, 6, 5, 1'b1, 1'b1, 97);     // heavy write-back stalls
    run_block(32, 16, 32, 1'b0, 1'b1, 0);   // full 64 KB banks, E
    run_block(32, 16, 32, 1'b1, 1'b0, 20);  // full 64 KB banks, H
    // every mechanism must have happened
    begin
      int cnt [12];
      string nm [12];
      cnt = '{n_load, n_compute, n_irq, n_rl_gated, n_wl_gated, n_df_gated, int'(u_mem.stall_count),
              n_rl_stall, n_hold, n_partial, n_multiburst, n_mode_h};
      nm  = '{"load phase", "compute phase", "interrupt", "read/core clock gated",
              "write clock gated", "FIFO write clock gated", "NPI stall", "read logic stall", "held boundary component",
              "partial last word", "multi-burst transfer", "H mode"};
      for (int m = 0; m < 12; m++) begin
        checks++;
        $display("mechanism %-24s : %0d", nm[m], cnt[m]);
        if (cnt[m] == 0) begin
          failures++;
          $display("FAIL mechanism never occurred: %s", nm[m]);
        end
      end
      checks++;
      if (n_irq != 6 || n_mode_e != 3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired: phase %0d wl_done %0d rl finished %0d wb %0d %0d %0d req %p got %p", dut.phase, dut.wl_done, dut.u_rl.finished, dut.u_ctrl.wb_words[0], dut.u_ctrl.wb_words[1], dut.u_ctrl.wb_words[2], dut.u_ctrl.req_beats, dut.u_ctrl.got_beats); $display("co_empty %b wr_full %b qe %b infl %0d owc %0d", dut.co_empty, npi_wr_full, dut.g_core[0].u_core.q_empty, dut.g_core[0].u_core.inflight, dut.g_core[0].u_core.o_wr_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
