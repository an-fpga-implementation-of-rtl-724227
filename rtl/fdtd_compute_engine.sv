// fdtd_compute_engine: 3-D FDTD field compute core for one block of the
// simulation volume.
//
// One run updates either the electric or the magnetic field of a block of
// ipts x djpts x kpts Yee cells that the host has cut out of the volume along
// its long (y) axis.  Data flow, as in the document's block diagram of the
// compute core:
//
//   DDR2 --6 NPI channels--> control_logic --6 diff_fifo (64b@200MHz ->
//   32b@100MHz)--> write_logic --> 6 x bram_bank (64 KB, dual port) -->
//   read_logic --> 3 x field_compute_core (Ex/Ey/Ez or Hx/Hy/Hz) -->
//   output FIFOs --> control_logic --3 NPI channels--> DDR2
//
// Phases: load (all six field components of the block into the banks),
// then compute with simultaneous write-back of the three updated
// components.  As in the document, clocks of idle parts are gated off to
// save power: the read logic and the cores while loading; the write logic,
// and the memory-side write ports of the six diff FIFOs (the inbound half of
// the NPI channels, which nothing uses then), while computing.
//
// The update of component x (and likewise y, z) is
//   F_new = F + C1*(a-b) - C2*(c-d)
// with the differences taken along the two axes of the curl; coef[0..5] are
// C1..C6 (core I uses C1,C2, core II C3,C4, core III C5,C6).
//
// Clocks: clk_npi (200 MHz in the document) for the memory side, clk_core
// (100 MHz) for banks, write and read logic and the cores.  The phase goes
// to the core domain through two-flop synchronisers, the write logic's
// completion back the same way.  Host interface (this design's choice; the
// document reaches the core over the processor bus and an interrupt line):
// mode, geom, base_addr and coef must be stable from start until done;
// start is a one-clock pulse in clk_npi; done stays set until the next
// accepted start (a start given while the previous block is still
// draining is held until the core domain is idle), irq pulses once per
// block.  A block may hold at most 16384 cells (one 64 KB bank per
// component).  Each base address must be a multiple of 8 bytes (one NPI
// beat); for an odd cell count the spare upper half of the last beat is
// left untouched by the write-back.
module fdtd_compute_engine
  import fdtd_pkg::*;
#(
  parameter int unsigned BANK_DEPTH = BANK_WORDS,   // words per BRAM bank
  parameter int unsigned FIFO_DEPTH = 32            // diff / operand / output FIFOs
) (
  input  logic          clk_npi,
  input  logic          clk_core,
  input  logic          rst_n,
  // host control
  input  logic          start,
  input  logic          mode,          // 0: update E, 1: update H
  input  block_geom_t   geom,
  input  logic [31:0]   base_addr [6], // byte address of Ex,Ey,Ez,Hx,Hy,Hz of the block
  input  fp32_t         coef [6],      // C1..C6
  output logic          busy,
  output logic          done,
  output logic          irq,
  // NPI channels to the memory controller
  output logic [5:0]    npi_req_valid,
  input  logic [5:0]    npi_req_ready,
  output logic [5:0]    npi_req_rnw,
  output logic [31:0]   npi_req_addr [6],
  output logic [5:0]    npi_req_beats [6],
  input  logic [5:0]    npi_rd_empty,
  output logic [5:0]    npi_rd_pop,
  input  logic [63:0]   npi_rd_data [6],
  output logic [5:0]    npi_wr_push,
  output logic [63:0]   npi_wr_data [6],
  output logic [7:0]    npi_wr_be [6],
  input  logic [5:0]    npi_wr_full
);
  localparam int unsigned AW = $clog2(BANK_DEPTH);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // ---------------- memory side ----------------
  phase_e          phase;
  upd_mode_e       run_mode;
  logic [CELL_AW:0] ncell;
  logic [5:0]      df_wr_en, df_full;
  logic [63:0]     df_wr_data [6];
  logic            load_done_s1, load_done_s2;
  logic [2:0]      co_empty, co_rd_en;
  fp32_t           co_data [3];
  logic            core_idle;
  logic [1:0]      core_idle_s;

  assign ncell = (CELL_AW+1)'(geom.ipts * geom.kpts * geom.djpts);

  control_logic u_ctrl (
    .clk(clk_npi), .rst_n,
    .start, .mode(upd_mode_e'(mode)), .ncell, .base_addr,
    .busy, .done, .irq, .phase, .run_mode,
    .npi_req_valid, .npi_req_ready, .npi_req_rnw, .npi_req_addr, .npi_req_beats,
    .npi_rd_empty, .npi_rd_pop, .npi_rd_data,
    .npi_wr_push, .npi_wr_data, .npi_wr_be, .npi_wr_full,
    .df_wr_en, .df_wr_data, .df_full, .load_done(load_done_s2), .core_idle(core_idle_s[1]),
    .co_empty, .co_data, .co_rd_en
  );

  // ---------------- phase into the core domain ----------------
  logic [1:0] load_sync, comp_sync;
  logic       load_c, comp_c;
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      load_sync <= '0;
      comp_sync <= '0;
    end else begin
      load_sync <= {load_sync[0], phase == PH_LOAD};
      comp_sync <= {comp_sync[0], phase == PH_COMPUTE};
    end
  end
  assign load_c = load_sync[1];
  assign comp_c = comp_sync[1];

  // The core domain reports that it has seen the idle phase; by then both
  // gated clocks have run once with their enables low and cleared their
  // counters.  This goes back to the control logic through two flops.
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) core_idle <= 1'b0;
    else        core_idle <= !load_c && !comp_c;
  end
  always_ff @(posedge clk_npi or negedge rst_n) begin
    if (!rst_n) core_idle_s <= '0;
    else        core_idle_s <= {core_idle_s[0], core_idle};
  end

  // ---------------- clock gates ----------------
  logic wl_clk, rl_clk, df_clk;
  clock_gate u_cg_wl (.clk(clk_core), .en(!comp_c), .gclk(wl_clk));
  clock_gate u_cg_rl (.clk(clk_core), .en(!load_c), .gclk(rl_clk));
  clock_gate u_cg_df (.clk(clk_npi),  .en(phase != PH_COMPUTE), .gclk(df_clk));

  // ---------------- differential clocked FIFOs ----------------
  logic [5:0] df_empty, df_rd_en;
  fp32_t      df_rd_data [6];
  for (genvar c = 0; c < 6; c++) begin : g_df
    diff_fifo #(.DEPTH(FIFO_DEPTH)) u_df (
      .wclk(df_clk), .wrst_n(rst_n), .wr_en(df_wr_en[c]), .wr_data(df_wr_data[c]),
      .full(df_full[c]), .wr_count(),
      .rclk(wl_clk), .rrst_n(rst_n), .rd_en(df_rd_en[c]), .rd_data(df_rd_data[c]),
      .empty(df_empty[c])
    );
  end

  // ---------------- write logic ----------------
  logic [5:0]    wl_we;
  logic [AW-1:0] wl_addr [6];
  fp32_t         wl_wdata [6];
  logic          wl_done;

  write_logic #(.NCH(6), .AW(AW)) u_wl (
    .clk(wl_clk), .rst_n, .load_en(load_c), .ncell((AW+1)'(ncell)),
    .f_empty(df_empty), .f_data(df_rd_data), .f_rd_en(df_rd_en),
    .b_we(wl_we), .b_addr(wl_addr), .b_wdata(wl_wdata), .done(wl_done)
  );

  always_ff @(posedge clk_npi or negedge rst_n) begin
    if (!rst_n) begin
      load_done_s1 <= 1'b0;
      load_done_s2 <= 1'b0;
    end else begin
      load_done_s1 <= wl_done;
      load_done_s2 <= load_done_s1;
    end
  end

  // ---------------- BRAM banks ----------------
  logic [AW-1:0] rl_p0;
  logic [AW-1:0] rl_p1 [6];
  fp32_t         a_rdata [6], b_rdata [6];
  for (genvar b = 0; b < 6; b++) begin : g_bank
    bram_bank #(.WORDS(BANK_DEPTH), .WIDTH(32)) u_bank (
      .clk(clk_core),
      .a_we(load_c && wl_we[b]), .a_addr(load_c ? wl_addr[b] : rl_p0), .a_wdata(wl_wdata[b]),
      .a_rdata(a_rdata[b]),
      .b_we(1'b0), .b_addr(rl_p1[b]), .b_wdata('0), .b_rdata(b_rdata[b])
    );
  end

  // ---------------- read logic and cores ----------------
  logic [CW-1:0]   core_count [NCORE];
  logic [NCORE-1:0] core_push;
  core_ops_t       core_ops [NCORE];

  read_logic #(.AW(AW), .FIFO_DEPTH(FIFO_DEPTH)) u_rl (
    .clk(rl_clk), .rst_n, .run_en(comp_c), .mode(run_mode), .geom,
    .p0_addr(rl_p0), .p1_addr(rl_p1), .p0_data(a_rdata), .p1_data(b_rdata),
    .core_count, .core_push, .core_ops, .done()
  );

  for (genvar c = 0; c < int'(NCORE); c++) begin : g_core
    field_compute_core #(.FIFO_DEPTH(FIFO_DEPTH)) u_core (
      .clk(rl_clk), .rst_n,
      .in_valid(core_push[c]), .in_ops(core_ops[c]), .in_count(core_count[c]),
      .c1(coef[2*c]), .c2(coef[2*c+1]),
      .oclk(clk_npi), .orst_n(rst_n),
      .out_rd_en(co_rd_en[c]), .out_data(co_data[c]), .out_empty(co_empty[c]),
      .busy()
    );
  end

endmodule
