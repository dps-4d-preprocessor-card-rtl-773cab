// dps_pkg: types and constants shared by the DPS-4D preprocessor FPGA.
//
// The preprocessor writes every sample into an external 256K x 18 SRAM at an
// address that already encodes where the sample belongs in the sorted record:
//
//   addr[17]    frequency number (0 = frequency 1, 1 = frequency 2)
//   addr[16:15] antenna number (4 antennas, 0x08000 apart)
//   addr[14:11] spare, always zero
//   addr[10:1]  height (sample) number
//   addr[0]     q: in-phase (0) or quadrature (1) word
//
// The 18-bit address, the 16-bit data word, the antenna and frequency fields
// and the address layout follow the original DPS-4D card; the names of the I/Q bit and the
// SRAM request bundle are this design's own. Only 16 of the 18 SRAM data bits
// are used.
package dps_pkg;

  localparam int unsigned AW       = 18;  // SRAM address width
  localparam int unsigned DW       = 16;  // sample word width
  localparam int unsigned NIBW     = 4;   // GrayChip nibble width
  localparam int unsigned ANT_W    = 2;   // 4 antennas
  localparam int unsigned SPARE_W  = 4;   // zero bits between antenna and height
  localparam int unsigned HGT_W    = AW - 8;  // 10-bit height field
  localparam int unsigned CNT_W    = AW - 4;  // interleaver sample counter width

  // Interleaver counter: the order in which words arrive from the receiver.
  // Frequency toggles fastest, then I/Q, then antenna, then height.
  typedef struct packed {
    logic [HGT_W-1:0] hgt;
    logic [ANT_W-1:0] ant;
    logic             q;
    logic             freq;
  } arrival_idx_t;

  // SRAM address of a sample in the sorted record.
  typedef struct packed {
    logic               freq;
    logic [ANT_W-1:0]   ant;
    logic [SPARE_W-1:0] spare;
    logic [HGT_W-1:0]   hgt;
    logic               q;
  } mem_addr_t;

  // Read order of the sorted record: frequency, then antenna, then height,
  // then I/Q (I/Q changes fastest). Same fields as the address minus spare.
  typedef struct packed {
    logic             freq;
    logic [ANT_W-1:0] ant;
    logic [HGT_W-1:0] hgt;
    logic             q;
  } out_idx_t;

  // One synchronous SRAM access request. re reads addr, we writes wdata.
  typedef struct packed {
    logic [AW-1:0] addr;
    logic          we;
    logic          re;
    logic [DW-1:0] wdata;
  } sram_req_t;

  localparam sram_req_t SRAM_IDLE = '{addr: '0, we: 1'b0, re: 1'b0, wdata: '0};

  typedef enum logic [1:0] {
    PH_IDLE     = 2'd0,
    PH_SAMPLING = 2'd1,
    PH_COPYING  = 2'd2
  } phase_t;

  function automatic mem_addr_t addr_of_arrival(arrival_idx_t i);
    mem_addr_t a;
    a.freq  = i.freq;
    a.ant   = i.ant;
    a.spare = '0;
    a.hgt   = i.hgt;
    a.q     = i.q;
    return a;
  endfunction

  function automatic mem_addr_t addr_of_out(out_idx_t i);
    mem_addr_t a;
    a.freq  = i.freq;
    a.ant   = i.ant;
    a.spare = '0;
    a.hgt   = i.hgt;
    a.q     = i.q;
    return a;
  endfunction

  // Next index in read order for a record of `heights` heights.
  // last is set when i is the final word of the record.
  function automatic out_idx_t next_out(out_idx_t i, logic [HGT_W:0] heights, output logic last);
    out_idx_t n;
    n    = i;
    last = 1'b0;
    if (i.q == 1'b0) begin
      n.q = 1'b1;
    end else begin
      n.q = 1'b0;
      if ({1'b0, i.hgt} + 1'b1 < heights) begin
        n.hgt = i.hgt + 1'b1;
      end else begin
        n.hgt = '0;
        if (i.ant != '1) begin
          n.ant = i.ant + 1'b1;
        end else begin
          n.ant = '0;
          if (i.freq == 1'b0) n.freq = 1'b1;
          else                last   = 1'b1;
        end
      end
    end
    return n;
  endfunction

endpackage
