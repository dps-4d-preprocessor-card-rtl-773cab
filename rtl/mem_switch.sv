// mem_switch: the two memory switches of the preprocessor.
//
// Memory 1 and Memory 2 each have one synchronous port. While the card is
// sampling (or idle), Memory 1 takes the interleaver's writes and Memory 2
// serves the IDE interface's reads. While copying, both memories belong to
// the copy engine: Memory 1 is read and Memory 2 written. Read data needs no
// switch, since each memory's data output goes to every reader and only the
// owner of the port looks at it.
//
// Combinational: a phase change redirects both ports in the same clock.
//
// The switch positions for sampling and copying follow the block diagrams of
// the original DPS-4D card; the request bundle and the idle phase treated like sampling are
// this design's own choices.
module mem_switch
  import dps_pkg::*;
(
  input  phase_t    phase,
  input  sram_req_t il_req,    // interleaver -> Memory 1 (sampling)
  input  sram_req_t cp_rd_req, // copy engine -> Memory 1 (copying)
  input  sram_req_t cp_wr_req, // copy engine -> Memory 2 (copying)
  input  sram_req_t ide_req,   // IDE interface -> Memory 2 (sampling)
  output sram_req_t m1_req,
  output sram_req_t m2_req
);

  always_comb begin
    if (phase == PH_COPYING) begin
      m1_req = cp_rd_req;
      m2_req = cp_wr_req;
    end else begin
      m1_req = il_req;
      m2_req = ide_req;
    end
  end

endmodule
