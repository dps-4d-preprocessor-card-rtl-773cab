// preprocessor_top: the DPS-4D preprocessor FPGA.
//
// The digital receiver card's two GrayChip down converters (one per sounding
// frequency, four antennas each, I and Q) send their samples as 4-bit
// nibbles. The preprocessor rebuilds 16-bit words, interleaves the two
// frequencies and writes every word straight to its place in a sorted record
// in external SRAM (Memory 1): frequency, then antenna, then height. Between
// receive windows it copies the record to a second SRAM (Memory 2), from
// which the DDESC computer reads it over an IDE port during the next window.
// The two memories thus form a ping-pong pair: one fills while the other
// drains.
//
//   GrayChip 1 -> nibble_assembler (A) --\
//                                         interlace_a_and_b -> mem_switch -> Memory 1
//   GrayChip 2 -> nibble_assembler (B) --/                        |   ^
//                                              copy_engine <------+   |
//                                              copy_engine -> mem_switch -> Memory 2
//                                              ide_interface <-> mem_switch <-> Memory 2
//   SAMPLE_N, CIT_ON -> phase_controller -> phases, INTRQ
//
// Ports: the two nibble streams, SAMPLE_N and CIT_ON from the timing
// function, one synchronous SRAM port per memory (request bundle out, read
// data in, read data one clock after the request), and the IDE device
// signals (read side only). All logic runs on one clock; the async reset is
// active high.
//
// Words are taken only while sampling. The nibble streams must deliver a
// word per assembler no faster than one every 16 clocks: an accepted pair
// keeps the interleaver busy for 15 clocks (see interlace_a_and_b).
//
// Block structure, widths, the sorted address layout and the ping-pong
// sequence follow the original DPS-4D card; the handshakes between blocks are this
// design's own.
module preprocessor_top
  import dps_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  // GrayChip 1 (frequency 1) and GrayChip 2 (frequency 2) nibble outputs
  input  logic [NIBW-1:0] gc1_nib,
  input  logic            gc1_valid,
  input  logic            gc1_first,
  input  logic [NIBW-1:0] gc2_nib,
  input  logic            gc2_valid,
  input  logic            gc2_first,
  // timing function
  input  logic            cit_on,
  input  logic            sample_n,
  // Memory 1 and Memory 2 (256K x 18 synchronous SRAM, 16 bits used)
  output sram_req_t       m1_req,
  input  logic [DW-1:0]   m1_rdata,
  output sram_req_t       m2_req,
  input  logic [DW-1:0]   m2_rdata,
  // IDE device port to the DDESC
  input  logic            ide_cs0_n,
  input  logic [2:0]      ide_da,
  input  logic            ide_dior_n,
  output logic [DW-1:0]   ide_dd,
  output logic            ide_dd_oe,
  output logic            ide_intrq,
  // status
  output phase_t          phase
);

  logic            samp_start, copy_start, copy_done, record_ready, flush;
  logic [HGT_W:0]  heights;
  logic            sampling;
  logic [DW-1:0]   word_a, word_b;
  logic            valid_a, valid_b, take;
  logic            il_idle, il_wr;
  logic [AW-1:0]   il_addr;
  logic [DW-1:0]   il_data;
  logic [CNT_W-1:0] il_count;
  sram_req_t       il_req, cp_rd_req, cp_wr_req, ide_req;
  logic            cp_busy;

  assign sampling = (phase == PH_SAMPLING);

  nibble_assembler u_asm_a (
    .clk, .reset, .clear(samp_start),
    .nib(gc1_nib), .nib_valid(gc1_valid && sampling), .nib_first(gc1_first),
    .take, .word(word_a), .word_valid(valid_a)
  );

  nibble_assembler u_asm_b (
    .clk, .reset, .clear(samp_start),
    .nib(gc2_nib), .nib_valid(gc2_valid && sampling), .nib_first(gc2_first),
    .take, .word(word_b), .word_valid(valid_b)
  );

  interlace_a_and_b u_interlace (
    .clk, .reset, .clear(samp_start),
    .rdy_in(valid_a && valid_b && sampling),
    .data_a(word_a), .data_b(word_b),
    .take, .addr(il_addr), .w_data(il_data), .rdy_out(il_wr),
    .idle(il_idle), .count(il_count)
  );

  always_comb begin
    il_req       = SRAM_IDLE;
    il_req.addr  = il_addr;
    il_req.we    = il_wr;
    il_req.wdata = il_data;
  end

  phase_controller u_phase (
    .clk, .reset, .cit_on, .sample_n,
    .il_idle, .il_count, .copy_done,
    .phase, .samp_start, .copy_start, .heights, .record_ready, .flush
  );

  copy_engine u_copy (
    .clk, .reset, .start(copy_start), .heights,
    .m1_req(cp_rd_req), .m1_rdata,
    .m2_req(cp_wr_req),
    .busy(cp_busy), .done(copy_done)
  );

  mem_switch u_switch (
    .phase, .il_req, .cp_rd_req, .cp_wr_req, .ide_req, .m1_req, .m2_req
  );

  ide_interface u_ide (
    .clk, .reset, .load(record_ready), .heights, .flush,
    .hold(phase == PH_COPYING),
    .m2_req(ide_req), .m2_rdata,
    .cs0_n(ide_cs0_n), .da(ide_da), .dior_n(ide_dior_n),
    .dd(ide_dd), .dd_oe(ide_dd_oe), .intrq(ide_intrq)
  );

  // The copy engine only runs while the card is in its copying phase.
  a_copy_in_phase : assert property (@(posedge clk) disable iff (reset)
    cp_busy |-> phase == PH_COPYING);

endmodule
