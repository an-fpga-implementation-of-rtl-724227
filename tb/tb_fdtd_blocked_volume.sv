// tb_fdtd_blocked_volume: the engine run the way a host uses it on a volume
// larger than one block: the 101 x 301 x 51 cell microstrip problem of the
// original work.  The host loop cuts the volume along y into blocks of
// three x-z planes (15453 cells, close to the 16384 the banks allow) that
// overlap by one plane, and runs every block for the E half step, then
// every block for the H half step.  It first runs two time steps on the
// first 9 planes only (4 blocks per half step, so that a second step starts
// from fields the engine itself produced), then one time step on the whole
// volume (150 blocks per half step).  After every half step all six field
// arrays in memory are compared bit for bit with a reference that updates
// the whole volume at once (cells on the far faces keep E and cells on the
// near faces keep H, the engine's rule at block faces).  Agreement shows
// that the overlapping blocks update every plane exactly once.  The time of
// one block, including the load with random memory stalls, is printed.
module tb_fdtd_blocked_volume;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  timeunit 1ns;
  timeprecision 100ps;

  localparam int IP = 101, KP = 51, JP_MAX = 301, DJ = 3;
  localparam int NV = IP * KP * JP_MAX;
  localparam int unsigned FSTRIDE = 32'h80_0000;    // bytes between field arrays
  int jp;                                           // planes of the current run

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
  int checks = 0, failures = 0, blocks = 0;

  always #2.5 clk_npi = ~clk_npi;
  initial begin
    #1.3;
    forever #5 clk_core = ~clk_core;
  end

  fdtd_compute_engine dut (.*);

  npi_mem_model #(.WORDS(6 * FSTRIDE / 8), .STALL(1'b1)) u_mem (
    .clk(clk_npi),
    .req_valid(npi_req_valid), .req_ready(npi_req_ready), .req_rnw(npi_req_rnw),
    .req_addr(npi_req_addr), .req_beats(npi_req_beats),
    .rd_empty(npi_rd_empty), .rd_pop(npi_rd_pop), .rd_data(npi_rd_data),
    .wr_push(npi_wr_push), .wr_data(npi_wr_data), .wr_be(npi_wr_be), .wr_full(npi_wr_full)
  );

  fp32_t fe [3][NV];
  fp32_t fh [3][NV];
  fp32_t nw [3][NV];
  fp32_t ce [6], ch [6];

  function automatic int idx(int i, int j, int k);
    return (j * KP + k) * IP + i;
  endfunction

  function automatic fp32_t rnd_fp();
    logic [7:0] e;
    e = 8'(118 + ($urandom % 12));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic fp32_t upd(fp32_t f, fp32_t c1, fp32_t a, fp32_t b, fp32_t c2, fp32_t c, fp32_t d);
    return fadd(f, fsub(fmul(c1, fsub(a, b)), fmul(c2, fsub(c, d))));
  endfunction

  // whole-volume reference half step
  task automatic ref_step(input bit is_h);
    fp32_t c [6];
    c = is_h ? ch : ce;
    for (int j = 0; j < jp; j++) for (int k = 0; k < KP; k++) for (int i = 0; i < IP; i++) begin
      int n;
      bit hld;
      n = idx(i, j, k);
      hld = is_h ? (i == 0 || j == 0 || k == 0) : (i == IP-1 || j == jp-1 || k == KP-1);
      if (!is_h) begin
        nw[0][n] = hld ? fe[0][n] :
          upd(fe[0][n], c[0], fh[2][idx(i,j+1,k)], fh[2][n], c[1], fh[1][idx(i,j,k+1)], fh[1][n]);
        nw[1][n] = hld ? fe[1][n] :
          upd(fe[1][n], c[2], fh[0][idx(i,j,k+1)], fh[0][n], c[3], fh[2][idx(i+1,j,k)], fh[2][n]);
        nw[2][n] = hld ? fe[2][n] :
          upd(fe[2][n], c[4], fh[1][idx(i+1,j,k)], fh[1][n], c[5], fh[0][idx(i,j+1,k)], fh[0][n]);
      end else begin
        nw[0][n] = hld ? fh[0][n] :
          upd(fh[0][n], c[0], fe[1][n], fe[1][idx(i,j,k-1)], c[1], fe[2][n], fe[2][idx(i,j-1,k)]);
        nw[1][n] = hld ? fh[1][n] :
          upd(fh[1][n], c[2], fe[2][n], fe[2][idx(i-1,j,k)], c[3], fe[0][n], fe[0][idx(i,j,k-1)]);
        nw[2][n] = hld ? fh[2][n] :
          upd(fh[2][n], c[4], fe[0][n], fe[0][idx(i,j-1,k)], c[5], fe[1][n], fe[1][idx(i-1,j,k)]);
      end
    end
    for (int a = 0; a < 3; a++) for (int n = 0; n < IP * KP * jp; n++)
      if (is_h) fh[a][n] = nw[a][n]; else fe[a][n] = nw[a][n];
  endtask

  function automatic fp32_t mem_word(int f, int n);
    logic [63:0] w;
    w = u_mem.mem[(f * FSTRIDE + n * 4) / 8];
    return (n % 2 == 0) ? w[31:0] : w[63:32];
  endfunction

  task automatic put_word(int f, int n, fp32_t v);
    int a;
    a = (f * FSTRIDE + n * 4) / 8;
    if (n % 2 == 0) u_mem.mem[a][31:0] = v;
    else            u_mem.mem[a][63:32] = v;
  endtask

  // host loop: all blocks of one half step
  task automatic engine_step(input bit is_h);
    coef = is_h ? ch : ce;
    for (int j0 = 0; j0 + 1 < jp; j0 += DJ - 1) begin
      int dj;
      realtime t0;
      dj = (j0 + DJ <= jp) ? DJ : jp - j0;
      @(negedge clk_npi);
      for (int f = 0; f < 6; f++) base_addr[f] = 32'(f) * FSTRIDE + 32'(j0 * IP * KP * 4);
      geom  = '{ipts: CELL_AW'(IP), kpts: CELL_AW'(KP), djpts: CELL_AW'(dj)};
      mode  = is_h;
      start = 1;
      @(negedge clk_npi);
      start = 0;
      wait (busy);      // start is taken once the previous block has drained
      t0 = $realtime;
      wait (done);
      if (j0 == 2 && jp < JP_MAX) $display("%s block of %0d cells: %0.1f us", is_h ? "H" : "E", IP * KP * dj, ($realtime - t0) / 1us);
      repeat (3) @(negedge clk_npi);
      blocks++;
    end
  endtask

  task automatic compare(input string tag);
    int err0;
    err0 = failures;
    for (int a = 0; a < 3; a++) for (int n = 0; n < NV; n++) begin
      checks += 2;
      if (mem_word(a, n) !== fe[a][n]) begin
        if (failures - err0 < 8) $display("  E%0d n=%0d i=%0d k=%0d j=%0d got %h exp %h", a, n, n % IP, (n / IP) % KP, n / (IP*KP), mem_word(a, n), fe[a][n]);
        failures++;
      end
      if (mem_word(a + 3, n) !== fh[a][n]) failures++;
    end
    $display("%s: %0d mismatches", tag, failures - err0);
  endtask

  initial begin
    for (int c = 0; c < 6; c++) begin
      ce[c] = {1'($urandom), 8'(123 + $urandom % 3), 23'($urandom)};
      ch[c] = {1'($urandom), 8'(123 + $urandom % 3), 23'($urandom)};
      base_addr[c] = '0;
      coef[c] = '0;
    end
    geom = '0;
    for (int a = 0; a < 3; a++) for (int n = 0; n < NV; n++) begin
      fe[a][n] = rnd_fp();
      fh[a][n] = rnd_fp();
      put_word(a, n, fe[a][n]);
      put_word(a + 3, n, fh[a][n]);
    end
    repeat (5) @(negedge clk_npi);
    rst_n = 1;
    repeat (5) @(negedge clk_npi);
    // two time steps on the first 9 planes (4 blocks per pass), then one
    // time step on the whole 301-plane volume (150 blocks per pass)
    for (int r = 0; r < 3; r++) begin
      realtime t0;
      jp = (r < 2) ? 9 : JP_MAX;
      t0 = $realtime;
      engine_step(1'b0);
      ref_step(1'b0);
      compare($sformatf("%0d planes, step %0d E", jp, r));
      engine_step(1'b1);
      ref_step(1'b1);
      compare($sformatf("%0d planes, step %0d H", jp, r));
      $display("time step on %0d planes: %0.2f ms", jp, ($realtime - t0) / 1ms);
    end
    checks++;
    if (blocks != 2 * 2 * 4 + 2 * 150) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
