// ide_interface: the card's IDE (ATA) device port towards the DDESC computer.
//
// The DDESC reads the sorted record out of Memory 2 as 16-bit words through
// the IDE data register, in the order frequency 1 antenna 1 heights 1..H,
// frequency 1 antenna 2, ..., frequency 2 antenna 4 (I and Q word of each
// height in turn). When the phase controller reports a new record
// (`load`), the port rewinds to the first word, prefetches it from Memory 2
// and raises INTRQ.
//
// Host side (ATA PIO read cycles, active-low strobes):
//   CS0_N low, DA = 0, DIOR_N low  -> DD = current data word
//   CS0_N low, DA = 7, DIOR_N low  -> DD = status: bit 7 BSY, bit 6 DRDY,
//                                     bit 3 DRQ; reading it clears INTRQ
// DD is driven (dd_oe) combinationally while a read strobe is low. DIOR_N, CS0_N and
// DA are also sampled through two flip-flops; the end (rising edge) of a data
// read moves the port to the next word, which is fetched from Memory 2 in
// the following clocks. DRQ is set while a fetched word waits for the host;
// BSY is set while the card copies or a fetch is in flight. CS0_N and DA
// must be steady 2 clocks before DIOR_N falls, DIOR_N must stay low for at
// least 4 clocks, and the next word is in DD 5 clocks after DIOR_N rises.
//
// Memory side: one read request per word, data one clock later. No fetch is
// made while `hold` is high (Memory 2 belongs to the copy engine then).
//
// The IDE connection, the 16-bit width and INTRQ follow the original DPS-4D card; the
// register subset, status bits, INTRQ clearing, prefetch and strobe timing are
// this design's own choices, taken from common ATA practice.
module ide_interface
  import dps_pkg::*;
(
  input  logic           clk,
  input  logic           reset,
  input  logic           load,      // Memory 2 holds a new record
  input  logic [HGT_W:0] heights,   // heights in that record
  input  logic           flush,     // drop the record
  input  logic           hold,      // Memory 2 not available
  output sram_req_t      m2_req,
  input  logic [DW-1:0]  m2_rdata,
  input  logic           cs0_n,
  input  logic [2:0]     da,
  input  logic           dior_n,
  output logic [DW-1:0]  dd,
  output logic           dd_oe,
  output logic           intrq
);

  localparam logic [2:0] REG_DATA   = 3'd0;
  localparam logic [2:0] REG_STATUS = 3'd7;

  out_idx_t       idx, idx_nx;
  logic           last;
  logic [HGT_W:0] hgt_q;
  logic           remaining;   // words of the record still to be read
  logic           word_ok;     // cur_word holds the word at idx
  logic           fetch_pend;
  logic [DW-1:0]  cur_word;

  logic [2:0]     dior_s;
  logic [1:0]     cs0_s;
  logic [2:0]     da_s0, da_s1;
  logic           sel_data;
  logic           rd_fall, rd_rise;

  always_comb idx_nx = next_out(idx, hgt_q, last);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      dior_s <= 3'b111;
      cs0_s  <= 2'b11;
      da_s0  <= '0;
      da_s1  <= '0;
    end else begin
      dior_s <= {dior_s[1:0], dior_n};
      cs0_s  <= {cs0_s[0], cs0_n};
      da_s0  <= da;
      da_s1  <= da_s0;
    end
  end

  assign rd_fall = dior_s[2] && !dior_s[1];
  assign rd_rise = !dior_s[2] && dior_s[1];

  logic fetch_now;
  assign fetch_now = remaining && !word_ok && !fetch_pend && !hold && !load && !flush;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      idx        <= '0;
      hgt_q      <= '0;
      remaining  <= 1'b0;
      word_ok    <= 1'b0;
      fetch_pend <= 1'b0;
      cur_word   <= '0;
      intrq      <= 1'b0;
      sel_data   <= 1'b0;
    end else begin
      fetch_pend <= fetch_now;
      if (fetch_pend) begin
        cur_word <= m2_rdata;
        word_ok  <= 1'b1;
      end
      if (rd_fall) begin
        sel_data   <= !cs0_s[1] && (da_s1 == REG_DATA);
        if (!cs0_s[1] && (da_s1 == REG_STATUS)) intrq <= 1'b0;
      end
      if (rd_rise) begin
        sel_data   <= 1'b0;
          if (sel_data && remaining && word_ok) begin
          idx     <= idx_nx;
          word_ok <= 1'b0;
          if (last) remaining <= 1'b0;
        end
      end
      if (flush) begin
        remaining  <= 1'b0;
        word_ok    <= 1'b0;
        fetch_pend <= 1'b0;
        intrq      <= 1'b0;
      end else if (load) begin
        idx        <= '0;
        hgt_q      <= heights;
        remaining  <= (heights != '0);
        word_ok    <= 1'b0;
        fetch_pend <= 1'b0;
        intrq      <= 1'b1;
      end
    end
  end

  always_comb begin
    m2_req      = SRAM_IDLE;
    m2_req.addr = addr_of_out(idx);
    m2_req.re   = fetch_now;
  end

  logic [7:0] status;
  always_comb begin
    status    = 8'h00;
    status[7] = hold || (remaining && !word_ok);  // BSY
    status[6] = 1'b1;                             // DRDY
    status[3] = remaining && word_ok && !hold;    // DRQ
  end

  assign dd_oe = !cs0_n && !dior_n && (da == REG_DATA || da == REG_STATUS);
  always_comb begin
    if (da == REG_STATUS) dd = {8'h00, status};
    else                  dd = cur_word;
  end

endmodule
