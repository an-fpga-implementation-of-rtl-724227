// write_logic: copies the loaded field words from the six differential
// clocked FIFOs into the six BRAM banks.
//
// As the document describes, the words of each FIFO are written into its
// BRAM bank in sequential order: word m of channel c goes to address m of
// bank c.  The six channels advance independently, one word per clock each,
// so a bank fills at the 100 MHz core clock rate as long as its FIFO has
// data.  A channel stops after ncell words; when ncell is odd the unused
// upper half of the last 64-bit word is popped and dropped.  done rises when
// all six banks hold ncell words.
//
// The module runs on its own gated clock.  While load_en is low it clears
// its counters, ready for the next block (this design's choice: the clock
// is left running in the idle phase so the clear can happen).
module write_logic
  import fdtd_pkg::*;
#(
  parameter int unsigned NCH = 6,
  parameter int unsigned AW  = CELL_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_en,
  input  logic [AW:0]       ncell,
  // read side of the differential FIFOs
  input  logic [NCH-1:0]    f_empty,
  input  fp32_t             f_data [NCH],
  output logic [NCH-1:0]    f_rd_en,
  // write port of each bank
  output logic [NCH-1:0]    b_we,
  output logic [AW-1:0]     b_addr [NCH],
  output fp32_t             b_wdata [NCH],
  output logic              done
);
  logic [AW:0] cnt [NCH];
  logic [AW:0] ncell_even;

  assign ncell_even = ncell + (AW+1)'(ncell[0]);

  always_comb begin
    done = load_en;
    for (int c = 0; c < int'(NCH); c++) begin
      f_rd_en[c] = load_en && !f_empty[c] && (cnt[c] < ncell_even);
      b_we[c]    = f_rd_en[c] && (cnt[c] < ncell);
      b_addr[c]  = cnt[c][AW-1:0];
      b_wdata[c] = f_data[c];
      if (cnt[c] < ncell_even) done = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NCH); c++) cnt[c] <= '0;
    end else begin
      for (int c = 0; c < int'(NCH); c++) begin
        if (!load_en)        cnt[c] <= '0;
        else if (f_rd_en[c]) cnt[c] <= cnt[c] + 1'b1;
      end
    end
  end

endmodule
