// tb_ide_interface: self-checking test of ide_interface with a Memory 2 model.
// Acts as the IDE host: waits for INTRQ, polls the status register for DRQ,
// reads the data register word by word and compares every word with the
// record stored in the memory model, in the order frequency, antenna,
// height, I/Q. Also checks that a status read clears INTRQ, that DRQ drops
// after the last word, that no fetch happens while `hold` is high (BSY set),
// that flush drops the record, and that one memory read is made per word.
module tb_ide_interface;
  import dps_pkg::*;

  logic clk = 0, reset = 1, load = 0, flush = 0, hold = 0;
  logic [HGT_W:0] heights = '0;
  sram_req_t m2_req;
  logic [DW-1:0] m2_rdata, dd;
  logic cs0_n = 1, dior_n = 1, dd_oe, intrq;
  logic [2:0] da = '0;
  int checks = 0, failures = 0, reads = 0;

  always #5 clk = ~clk;

  ide_interface dut (.*);
  sram_model u_m2 (.clk, .req(m2_req), .rdata(m2_rdata));

  always @(posedge clk) reads += m2_req.re;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic host_read(input logic [2:0] r, output logic [15:0] v);
    #1 cs0_n = 0; da = r;
    repeat (2) @(posedge clk);
    #1 dior_n = 0;
    repeat (4) @(posedge clk);
    #1 check(dd_oe, "DD driven during read");
    v = dd;
    dior_n = 1;
    repeat (2) @(posedge clk);
    #1 cs0_n = 1;
    repeat (3) @(posedge clk);
  endtask

  function automatic logic [DW-1:0] pattern(int a);
    return DW'(a * 13 + 1) ^ DW'(a >> 3);
  endfunction

  task automatic read_record(input int h);
    logic [15:0] v;
    int tries;
    for (int f = 0; f < 2; f++)
      for (int ant = 0; ant < 4; ant++)
        for (int hh = 0; hh < h; hh++)
          for (int q = 0; q < 2; q++) begin
            int a;
            a = f * 'h20000 + ant * 'h08000 + hh * 2 + q;
            tries = 0;
            do begin host_read(3'd7, v); tries++; end while (!v[3] && tries < 50);
            host_read(3'd0, v);
            if (v != pattern(a)) begin
              check(0, $sformatf("word f%0d a%0d h%0d q%0d = %h expected %h", f, ant, hh, q, v, pattern(a)));
            end else checks++;
          end
    host_read(3'd7, v);
    check(!v[3], "DRQ clear after last word");
  endtask

  initial begin
    logic [15:0] v;
    for (int a = 0; a < (1 << AW); a++) u_m2.mem[a] = pattern(a);
    repeat (3) @(posedge clk);
    #1 reset = 0;
    host_read(3'd7, v);
    check(!v[3] && !intrq, "nothing to read after reset");
    // record of 5 heights
    reads = 0;
    heights = 5; load = 1; @(posedge clk); #1 load = 0;
    check(intrq, "INTRQ after load");
    host_read(3'd7, v);
    check(!intrq, "status read clears INTRQ");
    check(v[6], "DRDY");
    read_record(5);
    check(reads == 80, $sformatf("%0d memory reads for 80 words", reads));
    // hold blocks fetching
    hold = 1;
    heights = 2; load = 1; @(posedge clk); #1 load = 0;
    repeat (10) @(posedge clk);
    host_read(3'd7, v);
    check(v[7] && !v[3], "BSY and no DRQ while held");
    check(reads == 80, "no fetch while held");
    hold = 0;
    read_record(2);
    // flush
    heights = 4; load = 1; @(posedge clk); #1 load = 0;
    repeat (5) @(posedge clk);
    flush = 1; @(posedge clk); #1 flush = 0;
    host_read(3'd7, v);
    check(!v[3] && !intrq, "flush drops record and INTRQ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
