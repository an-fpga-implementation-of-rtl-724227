// diff_fifo: the differential clocked FIFO between an NPI channel and the
// write logic.
//
// The document specifies it: it accepts 64-bit words at 200 MHz and gives
// out 32-bit words at 100 MHz, and is 32 words deep.  Here the 32 entries
// are 64-bit entries held in an async_fifo (this design's reading of "32
// word deep"); on the read side the low 32-bit half of the head entry is
// delivered first, then the high half, and the entry is popped with the
// second half.
//
// Write side (wclk, 200 MHz): wr_en/wr_data, full, wr_count (entries).
// Read side (rclk, 100 MHz): rd_data is valid while empty is low; rd_en takes
// one 32-bit word.
module diff_fifo #(
  parameter int unsigned DEPTH = 32
) (
  input  logic                   wclk,
  input  logic                   wrst_n,
  input  logic                   wr_en,
  input  logic [63:0]            wr_data,
  output logic                   full,
  output logic [$clog2(DEPTH):0] wr_count,
  input  logic                   rclk,
  input  logic                   rrst_n,
  input  logic                   rd_en,
  output logic [31:0]            rd_data,
  output logic                   empty
);
  logic [63:0] head;
  logic        half;        // 0: low word next, 1: high word next
  logic        q_empty;

  async_fifo #(.WIDTH(64), .DEPTH(DEPTH)) u_fifo (
    .wclk, .wrst_n, .wr_en, .wr_data, .full, .wr_count,
    .rclk, .rrst_n,
    .rd_en   (rd_en && half),
    .rd_data (head),
    .empty   (q_empty)
  );

  assign empty   = q_empty;
  assign rd_data = half ? head[63:32] : head[31:0];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) half <= 1'b0;
    else if (rd_en)  half <= ~half;
  end

endmodule
