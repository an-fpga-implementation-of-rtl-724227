// control_logic: memory-side sequencer of the FDTD field compute engine.
//
// It owns the six NPI (Native Port Interface) channels to the DDR2 memory
// controller and runs one block at a time, as the document describes:
//
//   PH_LOAD    all six channels read their field array (Ex, Ey, Ez, Hx, Hy,
//              Hz of the block) in bursts and push the 64-bit words into the
//              channel's differential clocked FIFO; the write logic moves
//              them into the BRAM banks.  The phase ends when the write logic
//              reports all banks full.
//   PH_COMPUTE the cores run; the three channels of the updated field take
//              the results from the cores' output FIFOs, pack two results
//              per 64-bit word and write them back to the same addresses,
//              while the other three channels idle.  The phase ends when
//              every result has been written; done is then set and irq
//              pulses for one clock.
//
// The phase also selects the clock gates (the document turns off the read
// logic and cores while loading, the write logic and the idle NPI-side
// logic while computing).
//
// The NPI channel is modelled in this design as: an address request
// (req_valid/req_ready with req_rnw, byte address and burst length in
// 64-bit beats); a read-data FIFO on the controller side that this module
// pops (rd_empty/rd_pop/rd_data); a write-data FIFO that this module fills
// (wr_push/wr_data/wr_be, wr_full) before it requests the write burst.
// Bursts are NPI_BURST beats (this design's choice); each channel has one
// request in flight at a time.  Words are little-endian in a beat: the
// lower-addressed cell in bits 31:0.
//
// Clock: the 200 MHz memory-port clock.  load_done and core_idle come from
// the core clock domain and must be synchronised by the caller.  A start
// pulse is remembered and acted on once core_idle shows that the core
// domain has seen the idle phase (so the gated write and read logic have
// cleared their counters from the previous block).
module control_logic
  import fdtd_pkg::*;
#(
  parameter int unsigned BURST = NPI_BURST
) (
  input  logic          clk,
  input  logic          rst_n,
  // host side
  input  logic          start,
  input  upd_mode_e     mode,
  input  logic [CELL_AW:0] ncell,
  input  logic [31:0]   base_addr [6],
  output logic          busy,
  output logic          done,
  output logic          irq,
  output phase_e        phase,
  output upd_mode_e     run_mode,
  // NPI channels
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
  input  logic [5:0]    npi_wr_full,
  // differential FIFOs (write side)
  output logic [5:0]    df_wr_en,
  output logic [63:0]   df_wr_data [6],
  input  logic [5:0]    df_full,
  input  logic          load_done,
  input  logic          core_idle,
  // core output FIFOs (read side)
  input  logic [2:0]    co_empty,
  input  fp32_t         co_data [3],
  output logic [2:0]    co_rd_en
);
  localparam int unsigned BW = CELL_AW;   // beat counter width

  logic [BW:0]   nbeats;
  logic [BW:0]   req_beats [6];   // beats requested (read) / requested (write)
  logic [BW:0]   got_beats [6];   // beats received (read) / pushed (write)
  logic [5:0]    req_pend;
  logic [31:0]   base_q [6];
  logic [CELL_AW:0] ncell_q;
  logic [CELL_AW:0] wb_words [3];
  logic [31:0]   lo_word [3];
  logic [2:0]    half;
  logic          all_written;
  logic          start_pend;

  assign nbeats = ncell_q[CELL_AW:1] + (BW+1)'(ncell_q[0]);

  // channel of core c's result: the three banks of the updated field
  function automatic int unsigned wb_ch(input upd_mode_e m, input int unsigned c);
    return (m == MODE_E) ? c : c + 3;
  endfunction

  // ---------------- phase sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      run_mode <= MODE_E;
      done     <= 1'b0;
      irq      <= 1'b0;
      start_pend <= 1'b0;
      ncell_q  <= '0;
      for (int c = 0; c < 6; c++) base_q[c] <= '0;
    end else begin
      irq <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          if ((start || start_pend) && core_idle) begin
            start_pend <= 1'b0;
            phase      <= PH_LOAD;
            run_mode   <= mode;
            ncell_q    <= ncell;
            base_q     <= base_addr;
            done       <= 1'b0;
          end else if (start) begin
            start_pend <= 1'b1;
          end
        end
        PH_LOAD: if (load_done) phase <= PH_COMPUTE;
        PH_COMPUTE: if (all_written) begin
          phase <= PH_IDLE;
          done  <= 1'b1;
          irq   <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign busy = (phase != PH_IDLE);

  // ---------------- NPI channels ----------------
  logic [5:0] is_wb;      // channel writes back in this run
  always_comb begin
    for (int c = 0; c < 6; c++)
      is_wb[c] = (run_mode == MODE_E) ? (c < 3) : (c >= 3);
  end

  // write-back words packed per core
  logic [2:0] wb_take;
  always_comb begin
    logic [2:0] ch;
    for (int c = 0; c < 3; c++) begin
      ch = 3'(wb_ch(run_mode, c));
      wb_take[c] = (phase == PH_COMPUTE) && !co_empty[c] && !npi_wr_full[ch] &&
                   (wb_words[c] < ncell_q) &&
                   // keep at most one burst pushed ahead of its request
                   (got_beats[ch] < req_beats[ch] + (BW+1)'(BURST));
      co_rd_en[c] = wb_take[c];
    end
  end

  always_comb begin
    logic [BW:0] left;
    logic [2:0]  ch;
    left = '0;
    ch   = '0;
    for (int c = 0; c < 6; c++) begin
      npi_rd_pop[c]  = 1'b0;
      df_wr_en[c]    = 1'b0;
      df_wr_data[c]  = npi_rd_data[c];
      npi_wr_push[c] = 1'b0;
      npi_wr_data[c] = '0;
      npi_wr_be[c]   = 8'hFF;
      npi_req_valid[c] = 1'b0;
      npi_req_rnw[c]   = 1'b1;
      npi_req_addr[c]  = base_q[c] + 32'(req_beats[c]) * 32'd8;
      npi_req_beats[c] = '0;
      if (phase == PH_LOAD) begin
        // read burst requests and read-data transfer into the FIFO
        if (!req_pend[c] && req_beats[c] < nbeats) begin
          npi_req_valid[c] = 1'b1;
          npi_req_beats[c] = ((nbeats - req_beats[c]) > (BW+1)'(BURST)) ? 6'(BURST)
                                                                        : 6'(nbeats - req_beats[c]);
        end
        npi_rd_pop[c] = !npi_rd_empty[c] && !df_full[c] && (got_beats[c] < nbeats);
        df_wr_en[c]   = npi_rd_pop[c];
      end else if (phase == PH_COMPUTE && is_wb[c]) begin
        // write bursts: request once a whole burst (or the tail) is pushed
        left = nbeats - req_beats[c];
        npi_req_rnw[c] = 1'b0;
        if (req_beats[c] < nbeats &&
            (got_beats[c] - req_beats[c] >= (BW+1)'(BURST) || got_beats[c] == nbeats)) begin
          npi_req_valid[c] = 1'b1;
          npi_req_beats[c] = (left > (BW+1)'(BURST)) ? 6'(BURST) : 6'(left);
        end
      end
    end
    for (int c = 0; c < 3; c++) begin
      ch = 3'(wb_ch(run_mode, c));
      npi_wr_data[ch] = {co_data[c], lo_word[c]};
      // a beat leaves with its high word, or alone with the last odd word
      if (wb_take[c] && (half[c] || wb_words[c] == ncell_q - 1'b1)) begin
        npi_wr_push[ch] = 1'b1;
        if (!half[c]) begin
          npi_wr_data[ch] = {32'd0, co_data[c]};
          npi_wr_be[ch]   = 8'h0F;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 6; c++) begin
        req_beats[c] <= '0;
        got_beats[c] <= '0;
      end
      req_pend <= '0;
      half     <= '0;
      for (int c = 0; c < 3; c++) begin
        wb_words[c] <= '0;
        lo_word[c]  <= '0;
      end
    end else begin
      if (phase == PH_IDLE || (phase == PH_LOAD && load_done)) begin
        // fresh counters for the next phase
        for (int c = 0; c < 6; c++) begin
          req_beats[c] <= '0;
          got_beats[c] <= '0;
        end
        req_pend <= '0;
        half     <= '0;
        for (int c = 0; c < 3; c++) wb_words[c] <= '0;
      end else begin
        for (int c = 0; c < 6; c++) begin
          if (npi_req_valid[c] && npi_req_ready[c]) begin
            req_beats[c] <= req_beats[c] + (BW+1)'(npi_req_beats[c]);
            if (phase == PH_LOAD) req_pend[c] <= 1'b1;
          end
          if (npi_rd_pop[c]) begin
            got_beats[c] <= got_beats[c] + 1'b1;
            // the outstanding burst is complete when all its beats arrived
            if (got_beats[c] + 1'b1 == req_beats[c]) req_pend[c] <= 1'b0;
          end
          if (npi_wr_push[c]) got_beats[c] <= got_beats[c] + 1'b1;
        end
        for (int c = 0; c < 3; c++) begin
          if (wb_take[c]) begin
            wb_words[c] <= wb_words[c] + 1'b1;
            half[c]     <= ~half[c];
            if (!half[c]) lo_word[c] <= co_data[c];
          end
        end
      end
    end
  end

  always_comb begin
    all_written = 1'b1;
    for (int c = 0; c < 6; c++)
      if (is_wb[c] && req_beats[c] != nbeats) all_written = 1'b0;
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (npi_req_valid[0] && !npi_req_ready[0]) |=> npi_req_valid[0]);

endmodule
