// bram_bank: one 64 KB on-chip memory block with two independent
// read/write ports.
//
// The document places six of these between the write logic and the read
// logic, each with two read/write ports; this design stores one field
// component of a block in each, one 32-bit word per cell (16384 cells).
// Each port is synchronous: a write stores wdata at addr on the clock edge;
// a read returns the word at addr on rdata one clock later (read-first when
// the same port writes).  Writing the same address from both ports in the
// same cycle is not allowed (asserted).  The default 16384 x 32 matches the
// 64 KB the document gives; WORDS may be lowered for small tests.
module bram_bank #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  input  logic                     b_we,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    b_rdata <= mem[b_addr];
  end

  a_no_write_clash: assert property (@(posedge clk) !(a_we && b_we && a_addr == b_addr));

endmodule
