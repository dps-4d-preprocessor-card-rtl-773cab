// nibble_assembler: turns the 4-bit nibble stream of one GrayChip digital down
// converter into 16-bit sample words.
//
// Each sample word reaches the card as NIBBLES consecutive nibbles. nib_first
// marks the first nibble of a word; the first nibble received becomes the most
// significant one of the word. When the last nibble of a word arrives the
// complete word is copied into a holding register and word_valid rises. The
// word stays there, unchanged, until the next word is complete, so the
// consumer has a full word time to read it; take (or clear) drops word_valid.
// Nibbles arriving before the first nib_first after reset or clear are ignored.
//
// Interface: nib/nib_valid/nib_first come from the GrayChip, sampled on clk.
// Timing: word_valid and word change on the clock edge that accepts the last
// nibble of a word. An assertion flags a word completed while the previous
// one is still waiting (the source is faster than the consumer).
//
// The 4-bit input and 16-bit output follow the original DPS-4D card. The word framing
// signal, the nibble order (first nibble = most significant) and the
// take/clear handshake are this design's own choices.
module nibble_assembler
  import dps_pkg::*;
#(
  parameter int unsigned NIBBLES = DW / NIBW
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            clear,
  input  logic [NIBW-1:0] nib,
  input  logic            nib_valid,
  input  logic            nib_first,
  input  logic            take,
  output logic [DW-1:0]   word,
  output logic            word_valid
);

  localparam int unsigned CW = $clog2(NIBBLES);

  initial assert (NIBBLES >= 2 && NIBBLES * NIBW == DW)
    else $error("nibble_assembler: NIBBLES x %0d must equal the word width", NIBW);

  logic [DW-NIBW-1:0] shreg;
  logic [CW-1:0] count;
  logic          aligned;
  logic [DW-1:0] shifted;

  assign shifted = {shreg, nib};

  // a word is complete on this clock
  logic word_done;
  assign word_done = nib_valid && !nib_first && aligned && (count == CW'(NIBBLES - 1));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      shreg      <= '0;
      count      <= '0;
      aligned    <= 1'b0;
      word       <= '0;
      word_valid <= 1'b0;
    end else if (clear) begin
      count      <= '0;
      aligned    <= 1'b0;
      word_valid <= 1'b0;
    end else begin
      if (take) word_valid <= 1'b0;
      if (nib_valid && (aligned || nib_first)) begin
        aligned <= 1'b1;
        shreg   <= shifted[DW-NIBW-1:0];
        if (nib_first) begin
          count <= CW'(1);
        end else if (word_done) begin
          count      <= '0;
          word       <= shifted;
          word_valid <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

  // Handshake rule: a word must be taken before the next one is complete.
  a_no_overrun : assert property (@(posedge clk) disable iff (reset || clear)
    !(word_done && word_valid && !take))
    else $error("nibble_assembler: word overwritten before it was taken");

endmodule
