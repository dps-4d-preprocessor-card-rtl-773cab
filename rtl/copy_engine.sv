// copy_engine: copies the record just sampled from Memory 1 to Memory 2.
//
// After `start` the engine walks the sorted record in read order (frequency,
// antenna, height, I/Q; see dps_pkg::next_out) for `heights` heights, 16 words
// per height. Every clock it issues one Memory 1 read; the SRAM returns the
// word one clock later and the engine writes it to the same address in
// Memory 2 on that clock. For a record of N words the reads occupy the N
// clocks after the one in which `start` is high, the last write the clock
// after them, and the one-clock `done` pulse follows: it rises on the
// (N + 1)-th clock edge after the edge that samples `start`. With
// heights = 0, `done` rises on that edge itself.
//
// Copying the record from Memory 1 into Memory 2 between receive windows
// follows the original DPS-4D card. The one-word-per-clock pipeline, the read latency of one
// clock and the copy of complete heights only are this design's own choices.
module copy_engine
  import dps_pkg::*;
(
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  logic [HGT_W:0] heights,
  output sram_req_t      m1_req,    // reads of Memory 1
  input  logic [DW-1:0]  m1_rdata,  // read data, one clock after the read
  output sram_req_t      m2_req,    // writes to Memory 2
  output logic           busy,
  output logic           done
);

  out_idx_t       idx;
  logic           reading;
  logic           wr_pend;
  mem_addr_t      wr_addr;
  logic [HGT_W:0] hgt_q;
  logic           last;
  out_idx_t       idx_nx;

  always_comb idx_nx = next_out(idx, hgt_q, last);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      idx     <= '0;
      reading <= 1'b0;
      wr_pend <= 1'b0;
      wr_addr <= '0;
      hgt_q   <= '0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      wr_pend <= reading;
      wr_addr <= addr_of_out(idx);
      if (start) begin
        idx     <= '0;
        hgt_q   <= heights;
        reading <= (heights != '0);
        done    <= (heights == '0);
      end else if (reading) begin
        idx <= idx_nx;
        if (last) reading <= 1'b0;
      end
      if (wr_pend && !reading) done <= 1'b1;
    end
  end

  always_comb begin
    m1_req      = SRAM_IDLE;
    m1_req.addr = addr_of_out(idx);
    m1_req.re   = reading;
    m2_req       = SRAM_IDLE;
    m2_req.addr  = wr_addr;
    m2_req.we    = wr_pend;
    m2_req.wdata = m1_rdata;
  end

  assign busy = reading || wr_pend;

endmodule
