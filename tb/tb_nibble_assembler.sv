// tb_nibble_assembler: self-checking test of nibble_assembler.
// Sends random 16-bit words as four nibbles, most significant first, with
// random gaps, stray nibbles before alignment, a realignment in mid-word and
// a clear; checks every assembled word and the word_valid handshake.
module tb_nibble_assembler;
  import dps_pkg::*;

  logic clk = 0, reset = 1, clear = 0, nib_valid = 0, nib_first = 0, take = 0;
  logic [NIBW-1:0] nib = '0;
  logic [DW-1:0]   word;
  logic            word_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nibble_assembler dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send_nib(input logic [3:0] n, input bit first, input int gap);
    nib = n; nib_first = first; nib_valid = 1;
    @(posedge clk); #1;
    nib_valid = 0; nib_first = 0;
    repeat (gap) @(posedge clk);
    #1;
  endtask

  task automatic send_word(input logic [15:0] w, input int gap);
    for (int k = 0; k < 4; k++) send_nib(w[15-4*k -: 4], k == 0, gap);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 reset = 0;
    // stray nibbles before the first word boundary are ignored
    send_nib(4'hA, 0, 0); send_nib(4'h5, 0, 0); send_nib(4'h3, 0, 1);
    check(!word_valid, "no word before alignment");
    // words with random gaps
    for (int i = 0; i < 200; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      send_word(w, $urandom_range(0, 3));
      check(word_valid, "word_valid after last nibble");
      check(word == w, $sformatf("word %h expected %h", word, w));
      // word stays while the next one assembles
      if (i % 3 == 0) begin
        send_nib(4'h1, 1, 0);
        check(word == w && word_valid, "word held during next word");
        // realign: start again with a new word
      end
      take = 1; @(posedge clk); #1 take = 0;
      check(!word_valid, "take clears word_valid");
    end
    // clear in mid-word drops alignment and validity
    send_word(16'hBEEF, 0);
    send_nib(4'h7, 1, 0);
    clear = 1; @(posedge clk); #1 clear = 0;
    check(!word_valid, "clear drops word_valid");
    send_nib(4'h9, 0, 0); send_nib(4'h9, 0, 0); send_nib(4'h9, 0, 0);
    check(!word_valid, "unaligned nibbles after clear ignored");
    send_word(16'h1234, 0);
    check(word_valid && word == 16'h1234, "word after clear");
    // the figure's example: nibble columns 0011, 1110, 0111, 1010
    take = 1; @(posedge clk); #1 take = 0;
    send_word(16'b0011_1110_0111_1010, 2);
    check(word == 16'h3E7A, "example word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
