// sram_model: behavioural model of one external 256K x 18 synchronous SRAM
// (the card's Memory 1 or Memory 2), used by the testbenches only.
//
// One port, driven by a dps_pkg::sram_req_t request. A write (we) stores
// wdata at addr on the clock edge; a read (re) returns the word at addr on
// rdata after that clock edge, i.e. one clock later. Only the 16 data bits
// the preprocessor uses are modelled. Contents start at zero.
module sram_model
  import dps_pkg::*;
(
  input  logic          clk,
  input  sram_req_t     req,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [0:(1<<AW)-1];
  int unsigned   writes;

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = '0;
    rdata  = '0;
    writes = 0;
  end

  always @(posedge clk) begin
    if (req.we) begin
      mem[req.addr] <= req.wdata;
      writes <= writes + 1;
    end
    if (req.re) rdata <= mem[req.addr];
  end

endmodule
