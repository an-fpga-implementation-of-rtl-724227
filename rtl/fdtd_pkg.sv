// fdtd_pkg: types and constants shared by the FDTD field compute engine.
//
// The engine keeps one block of the simulation volume on chip: six BRAM
// banks, one per field component (Ex, Ey, Ez, Hx, Hy, Hz), each holding one
// 32-bit IEEE-754 single-precision word per unit cell.  The six banks, the
// six NPI channels, the 64 KB bank size and the single-precision format follow
// the document; the cell ordering inside a bank, the 8-beat NPI burst and the
// update-mode encoding are choices of this design.
//
// Cell order inside a block (this design's choice): i runs fastest, then k,
// then j (the long axis along which the host cuts the volume into blocks), so
// cell n = (j*KPTS + k)*IPTS + i and consecutive blocks along y are
// contiguous in DDR2.
package fdtd_pkg;

  // One BRAM bank: 64 KB = 16384 single-precision words (document: 64 KB).
  localparam int unsigned BRAM_BYTES = 65536;
  localparam int unsigned BANK_WORDS = BRAM_BYTES / 4;
  localparam int unsigned CELL_AW    = $clog2(BANK_WORDS);   // 14

  // Six field components, six banks, six NPI channels (document: six).
  localparam int unsigned NFIELD = 6;
  // Three field compute cores (document: three).
  localparam int unsigned NCORE  = 3;

  // NPI burst length in 64-bit beats (this design's choice).
  localparam int unsigned NPI_BURST = 8;

  typedef logic [31:0] fp32_t;
  typedef logic [CELL_AW-1:0] cell_addr_t;
  typedef logic [CELL_AW:0]   cell_cnt_t;     // 0 .. BANK_WORDS

  // Bank / channel numbering.
  typedef enum logic [2:0] {
    F_EX = 3'd0, F_EY = 3'd1, F_EZ = 3'd2,
    F_HX = 3'd3, F_HY = 3'd4, F_HZ = 3'd5
  } field_e;

  // Which half of the leap-frog step the engine performs.
  typedef enum logic {
    MODE_E = 1'b0,     // E += curl H terms, forward differences of H
    MODE_H = 1'b1      // H += curl E terms, backward differences of E
  } upd_mode_e;

  // Phase the control logic is in; it also selects the clock gates.
  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,
    PH_LOAD    = 2'd1,
    PH_COMPUTE = 2'd2
  } phase_e;

  // Geometry of one block, set by the host.
  typedef struct packed {
    logic [CELL_AW-1:0] ipts;     // cells along x
    logic [CELL_AW-1:0] kpts;     // cells along z
    logic [CELL_AW-1:0] djpts;    // cells along y in this block
  } block_geom_t;

  // Five operands of one field update: F + C1*(a-b) - C2*(c-d).
  typedef struct packed {
    fp32_t a;
    fp32_t b;
    fp32_t c;
    fp32_t d;
    fp32_t f;
  } core_ops_t;

endpackage
