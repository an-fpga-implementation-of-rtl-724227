// npi_mem_model: behavioural model of the memory controller and DDR2 behind
// six NPI channels, for simulation only (not synthesizable).
//
// Memory is an array of 64-bit words addressed by byte address / 8.  Per
// channel: an address request is accepted when req_ready is high (ready is
// dropped at random, rstall_pct percent of the clocks); a read request queues its beats in
// the channel's read FIFO after READ_LAT clocks, from which the engine pops;
// a write request takes its beats from the channel's write FIFO, which the
// engine fills beforehand, honouring the byte enables.  wr_full rises at
// WFIFO_DEPTH entries (and at random, wstall_pct percent of the clocks).  stall_count
// counts the clocks in which a stall was applied.
module npi_mem_model #(
  parameter int unsigned WORDS       = 65536,
  parameter int unsigned READ_LAT    = 6,
  parameter int unsigned WFIFO_DEPTH = 32,
  parameter bit          STALL       = 1'b0
) (
  input  logic        clk,
  input  logic [5:0]  req_valid,
  output logic [5:0]  req_ready,
  input  logic [5:0]  req_rnw,
  input  logic [31:0] req_addr [6],
  input  logic [5:0]  req_beats [6],
  output logic [5:0]  rd_empty,
  input  logic [5:0]  rd_pop,
  output logic [63:0] rd_data [6],
  input  logic [5:0]  wr_push,
  input  logic [63:0] wr_data [6],
  input  logic [7:0]  wr_be [6],
  output logic [5:0]  wr_full
);
  logic [63:0] mem [WORDS];
  logic [63:0] rq [6][$];
  logic [63:0] wq [6][$];
  logic [7:0]  wbq [6][$];
  int unsigned stall_count = 0;
  int unsigned rstall_pct = STALL ? 25 : 0;   // may be changed by the testbench
  int unsigned wstall_pct = STALL ? 33 : 0;
  int unsigned reads = 0, writes = 0;

  initial begin
    req_ready = '1;
    wr_full   = '0;
  end

  always_comb begin
    for (int c = 0; c < 6; c++) begin
      rd_empty[c] = (rq[c].size() == 0);
      rd_data[c]  = (rq[c].size() == 0) ? 64'd0 : rq[c][0];
    end
  end

  task automatic do_read(input int c, input logic [31:0] addr, input int beats);
    repeat (READ_LAT) @(posedge clk);
    for (int n = 0; n < beats; n++) rq[c].push_back(mem[(addr >> 3) + n]);
  endtask

  always @(posedge clk) begin
    for (int c = 0; c < 6; c++) begin
      if (rd_pop[c]) void'(rq[c].pop_front());
      if (wr_push[c]) begin
        wq[c].push_back(wr_data[c]);
        wbq[c].push_back(wr_be[c]);
      end
      if (req_valid[c] && req_ready[c]) begin
        if (req_rnw[c]) begin
          automatic int          cc = c;
          automatic logic [31:0] aa = req_addr[c];
          automatic int          bb = int'(req_beats[c]);
          reads++;
          fork do_read(cc, aa, bb); join_none
        end else begin
          writes++;
          for (int n = 0; n < int'(req_beats[c]); n++) begin
            logic [63:0] w;
            logic [7:0]  be;
            logic [31:0] wa;
            w  = wq[c].pop_front();
            be = wbq[c].pop_front();
            wa = (req_addr[c] >> 3) + 32'(n);
            for (int bt = 0; bt < 8; bt++)
              if (be[bt]) mem[wa][bt*8 +: 8] = w[bt*8 +: 8];
          end
        end
      end
    end
    // stalls for the next clock
    for (int c = 0; c < 6; c++) begin
      logic st_r, st_w;
      st_r = ($urandom % 100) < rstall_pct;
      st_w = ($urandom % 100) < wstall_pct;
      req_ready[c] <= !st_r;
      wr_full[c]   <= st_w || (wq[c].size() + 2 >= WFIFO_DEPTH);
      if (st_r || st_w) stall_count++;
    end
  end

endmodule
