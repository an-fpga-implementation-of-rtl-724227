// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// The engine crosses between its 200 MHz memory-port clock and its 100 MHz
// core clock in two places: the differential clocked FIFOs that carry
// loaded field words to the write logic, and the output FIFO of each field
// compute core that carries results back to the control logic.  The
// document gives only the clocks and widths; the structure is the usual
// one, chosen by this design: binary pointers, their Gray codes passed
// through two-flop synchronisers, full and empty decided from the
// synchronised Gray codes.  DEPTH must be a power of two.
//
// Write side (wclk): push with wr_en when full is low.  wr_count is the fill
// level as the write side sees it (never below the true level).
// Read side (rclk): rd_data shows the head word whenever empty is low,
// rd_en pops it.  Flags react to the other side two to three clocks late,
// which is safe: full and empty can only be pessimistic.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic                 wclk,
  input  logic                 wrst_n,
  input  logic                 wr_en,
  input  logic [WIDTH-1:0]     wr_data,
  output logic                 full,
  output logic [$clog2(DEPTH):0] wr_count,
  input  logic                 rclk,
  input  logic                 rrst_n,
  input  logic                 rd_en,
  output logic [WIDTH-1:0]     rd_data,
  output logic                 empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int n = int'(AW) - 1; n >= 0; n--) b[n] = b[n+1] ^ g[n];
    return b;
  endfunction

  // write side
  always_ff @(posedge wclk) begin
    if (wr_en) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  assign wr_count = wbin - gray2bin(rgray_w2);
  assign full     = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read side
  assign rd_data = mem[rbin[AW-1:0]];
  assign empty   = (rgray == wgray_r2);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && empty));

endmodule
