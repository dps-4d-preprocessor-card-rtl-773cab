// tb_preprocessor_top: end-to-end test of the preprocessor at its default
// size, with two SRAM models as Memory 1 and Memory 2.
//
// The testbench plays the two GrayChips (one nibble every 6 clocks, I and Q
// of antennas 1..4 for each height, 256 heights per window), the timing
// function (CIT_ON, SAMPLE_N) and the DDESC host on the IDE port. Each
// window's samples carry a value made from (window, frequency, antenna,
// height, I/Q); the host reads every record after its INTRQ and checks each
// word and its order (frequency, antenna, height, I/Q). It also checks the
// number of Memory 1 writes per window, the length of each copying phase
// (16 words per height plus 3 clocks), and that these happened at least once:
// sampling windows, copies, INTRQs, records read, a window opening while the
// previous copy still runs, a CIT_ON flush, a partial height left out of the
// record, and status reads that found the port busy while copying.
module tb_preprocessor_top;
  import dps_pkg::*;

  localparam int H       = 256;  // heights per window
  localparam int NIB_GAP = 5;    // idle clocks between nibbles

  logic clk = 0, reset = 1;
  logic [NIBW-1:0] gc1_nib = '0, gc2_nib = '0;
  logic gc1_valid = 0, gc1_first = 0, gc2_valid = 0, gc2_first = 0;
  logic cit_on = 0, sample_n = 1;
  sram_req_t m1_req, m2_req;
  logic [DW-1:0] m1_rdata, m2_rdata, ide_dd;
  logic ide_cs0_n = 1, ide_dior_n = 1, ide_dd_oe, ide_intrq;
  logic [2:0] ide_da = '0;
  phase_t phase;

  int checks = 0, failures = 0;
  int n_windows = 0, n_copies = 0, n_intrq = 0, n_records = 0, n_late = 0;
  int n_flush = 0, n_partial = 0, n_busy = 0;

  always #5 clk = ~clk;

  preprocessor_top dut (.*);
  sram_model u_m1 (.clk, .req(m1_req), .rdata(m1_rdata));
  sram_model u_m2 (.clk, .req(m2_req), .rdata(m2_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [15:0] sample_val(int w, int f, int ant, int h, int q);
    return 16'(w * 4099 + f * 7919 + ant * 613 + h * 37 + q * 11) ^ 16'(h << 7);
  endfunction

  // --- bookkeeping of records: window number and heights, in copy order
  int rec_w[$], rec_h[$];

  // --- monitors
  logic intrq_q = 0;
  phase_t phase_q = PH_IDLE;
  int copy_len = 0, m1_writes = 0;
  logic m1_we_q = 0;
  int exp_copy_h[$];
  always @(posedge clk) if (!reset) begin
    intrq_q <= ide_intrq;
    if (ide_intrq && !intrq_q) n_intrq++;
    m1_we_q <= m1_req.we;
    if (m1_req.we && !m1_we_q) m1_writes++;
    phase_q <= phase;
    if (phase == PH_COPYING) copy_len++;
    if (phase == PH_SAMPLING && phase_q != PH_SAMPLING) n_windows++;
    if (phase != PH_COPYING && phase_q == PH_COPYING) begin
      int h;
      h = exp_copy_h.pop_front();
      n_copies++;
      check(copy_len == 16 * h + 3, $sformatf("copy phase %0d clocks, expected %0d", copy_len, 16 * h + 3));
      copy_len = 0;
    end
  end

  // --- GrayChips: both frequencies in lockstep
  task automatic send_word_pair(input logic [15:0] a, input logic [15:0] b);
    for (int k = 0; k < 4; k++) begin
      gc1_nib = a[15-4*k -: 4]; gc2_nib = b[15-4*k -: 4];
      gc1_first = (k == 0); gc2_first = (k == 0);
      gc1_valid = 1; gc2_valid = 1;
      @(posedge clk); #1;
      gc1_valid = 0; gc2_valid = 0; gc1_first = 0; gc2_first = 0;
      repeat (NIB_GAP) @(posedge clk);
      #1;
    end
  endtask

  // one receive window of h heights plus `extra` words of an unfinished height
  task automatic window(input int w, input int h, input int extra, input int gap_after);
    int sent;
    sample_n = 0;
    while (phase != PH_SAMPLING) @(posedge clk);
    #1;
    m1_writes = 0;
    sent = 0;
    for (int hh = 0; hh <= h; hh++)
      for (int ant = 0; ant < 4; ant++)
        for (int q = 0; q < 2; q++)
          if (hh < h || sent < extra) begin
            if (hh == h) sent++;
            send_word_pair(sample_val(w, 0, ant, hh, q), sample_val(w, 1, ant, hh, q));
          end
    repeat (20) @(posedge clk);
    check(m1_writes == 2 * (8 * h + extra), $sformatf("window %0d: %0d Memory 1 writes", w, m1_writes));
    rec_w.push_back(w); rec_h.push_back(h); exp_copy_h.push_back(h);
    if (extra > 0) n_partial++;
    #1 sample_n = 1;
    repeat (gap_after) @(posedge clk);
    #1;
  endtask

  // --- DDESC host
  task automatic host_read(input logic [2:0] r, output logic [15:0] v);
    ide_cs0_n = 0; ide_da = r;
    repeat (2) @(posedge clk);
    #1 ide_dior_n = 0;
    repeat (4) @(posedge clk);
    #1 v = ide_dd;
    check(ide_dd_oe, "DD driven");
    ide_dior_n = 1;
    repeat (6) @(posedge clk);
    #1;
  endtask

  // back-to-back data register reads: CS0_N and DA stay set
  task automatic data_read(output logic [15:0] v);
    ide_dior_n = 0;
    repeat (4) @(posedge clk);
    #1 v = ide_dd;
    check(ide_dd_oe, "DD driven");
    ide_dior_n = 1;
    repeat (6) @(posedge clk);
    #1;
  endtask

  initial begin : host
    logic [15:0] v;
    while (reset) @(posedge clk);
    @(posedge clk);
    forever begin
      bit polled;
      polled = 0;
      #1;
      while (!ide_intrq) begin
        if (phase == PH_COPYING && !polled) begin
          // during a copy the port reports BSY and no data
          host_read(3'd7, v);
          check(v[7] && !v[3], "BSY during copy");
          n_busy++;
          polled = 1;
          ide_cs0_n = 1;
        end
        @(posedge clk);
        #1;
      end
      host_read(3'd7, v);                 // clears INTRQ
      check(!ide_intrq, "INTRQ cleared by status read");
      begin
        int w, h, bad;
        w = rec_w.pop_front(); h = rec_h.pop_front();
        bad = 0;
        for (int f = 0; f < 2; f++)
          for (int ant = 0; ant < 4; ant++)
            for (int hh = 0; hh < h; hh++)
              for (int q = 0; q < 2; q++) begin
                if (q == 0 && hh % 64 == 0) begin
                  // check DRQ once per 128 words, as a PIO host does per block
                  do host_read(3'd7, v); while (!v[3]);
                  ide_da = 3'd0;
                  repeat (2) @(posedge clk);
                  #1;
                end
                data_read(v);
                if (v != sample_val(w, f, ant, hh, q)) begin
                  bad++;
                  if (bad < 5) $display("FAIL rec %0d f%0d a%0d h%0d q%0d: %h expected %h",
                                        w, f, ant, hh, q, v, sample_val(w, f, ant, hh, q));
                end
              end
        checks++;
        if (bad != 0) failures++;
        host_read(3'd7, v);
        check(!v[3], "DRQ clear after record");
        n_records++;
      end
      ide_cs0_n = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 reset = 0;
    repeat (5) @(posedge clk);
    #1 cit_on = 1;
    repeat (5) @(posedge clk);
    // windows 0..2 with room for the copy, window 3 opens during a copy
    window(0, H, 0, 16 * H + 50);
    check(n_intrq == 1 && n_windows == 1,
          $sformatf("INTRQ only after the first copy: intrq=%0d windows=%0d", n_intrq, n_windows));
    window(1, H, 0, 16 * H + 50);
    window(2, H, 0, 100);
    if (phase == PH_COPYING) n_late++;
    window(3, H, 0, 16 * H + 50);
    // let the host finish record 3
    while (n_records < 4) @(posedge clk);
    // CIT_ON drops during a window: nothing of it reaches Memory 2
    #1 sample_n = 0;
    repeat (200) @(posedge clk);
    #1 cit_on = 0;
    repeat (10) @(posedge clk);
    check(phase == PH_IDLE && !ide_intrq, "idle after CIT_ON drop");
    n_flush++;
    #1 sample_n = 1;
    repeat (10) @(posedge clk);
    // a new integration: a short window ending in a partial height
    #1 cit_on = 1;
    repeat (5) @(posedge clk);
    window(4, 3, 5, 200);
    while (n_records < 5) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_windows == 6, $sformatf("windows %0d", n_windows));
    check(n_copies == 5 && n_intrq == 5, $sformatf("copies %0d INTRQs %0d", n_copies, n_intrq));
    check(n_records == 5, "records read");
    check(n_late >= 1, "window opened during a copy");
    check(n_flush >= 1, "CIT_ON flush");
    check(n_partial >= 1, "partial height dropped");
    check(n_busy >= 1, "host saw the port busy");
    $display("windows=%0d copies=%0d intrq=%0d records=%0d late=%0d flush=%0d partial=%0d busy=%0d",
             n_windows, n_copies, n_intrq, n_records, n_late, n_flush, n_partial, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog: windows=%0d copies=%0d records=%0d", n_windows, n_copies, n_records);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
