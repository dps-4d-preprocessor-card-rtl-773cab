// tb_phase_controller: self-checking test of phase_controller.
// Plays the timing function (CIT_ON, SAMPLE_N), the interleaver (idle,
// count) and the copy engine (done after a delay) and checks the phase
// sequence, the one-clock pulses, the three-clock input latency, the wait
// for an idle interleaver, the latched height count, a window that opens
// during copying, and the flush when CIT_ON drops.
module tb_phase_controller;
  import dps_pkg::*;

  logic clk = 0, reset = 1, cit_on = 0, sample_n = 1, il_idle = 1, copy_done = 0;
  logic [CNT_W-1:0] il_count = '0;
  phase_t phase;
  logic samp_start, copy_start, record_ready, flush;
  logic [HGT_W:0] heights;
  int checks = 0, failures = 0;
  int n_samp = 0, n_copy = 0, n_ready = 0, n_flush = 0;

  always #5 clk = ~clk;

  phase_controller dut (.*);

  always @(posedge clk) begin
    n_samp  += samp_start;
    n_copy  += copy_start;
    n_ready += record_ready;
    n_flush += flush;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // wait for a pulse, counting clock edges; check it lasts one clock
  task automatic wait_pulse(ref logic sig, input int expect_edges, input string what);
    int k = 0;
    while (!sig && k < 1000) begin @(posedge clk); #1 k++; end
    if (expect_edges >= 0)
      check(k == expect_edges, $sformatf("%s after %0d clocks, expected %0d", what, k, expect_edges));
    else
      check(sig, what);
    @(posedge clk); #1;
    check(!sig, {what, " lasts one clock"});
  endtask

  task automatic copy_reply(input int delay);
    repeat (delay) @(posedge clk);
    #1 copy_done = 1; @(posedge clk); #1 copy_done = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 reset = 0;
    // SAMPLE_N low without CIT_ON does nothing
    sample_n = 0;
    repeat (8) @(posedge clk); #1;
    check(phase == PH_IDLE && n_samp == 0, "no sampling without CIT_ON");
    sample_n = 1; cit_on = 1;
    repeat (5) @(posedge clk); #1;
    check(phase == PH_IDLE, "idle with SAMPLE_N high");

    // window 1
    sample_n = 0;
    wait_pulse(samp_start, 3, "samp_start");
    check(phase == PH_SAMPLING, "sampling phase");
    il_count = CNT_W'(37 * 16 + 5); il_idle = 0;
    repeat (10) @(posedge clk); #1;
    sample_n = 1;
    repeat (12) @(posedge clk); #1;
    check(phase == PH_SAMPLING && n_copy == 0, "copy waits for the interleaver");
    il_idle = 1;
    wait_pulse(copy_start, 1, "copy_start");
    check(phase == PH_COPYING, "copying phase");
    check(heights == 37, $sformatf("heights %0d expected 37", heights));
    copy_reply(20);
    wait_pulse(record_ready, 0, "record_ready");
    check(phase == PH_IDLE, "idle after copy");

    // window 2 opens while window 1's copy is still running
    #1 sample_n = 0;
    wait_pulse(samp_start, 3, "samp_start 2");
    il_count = CNT_W'(256 * 16);
    repeat (4) @(posedge clk); #1 sample_n = 1;
    wait_pulse(copy_start, 3, "copy_start 2");
    check(heights == 256, "heights 256");
    sample_n = 0;                         // next window opens during copy
    repeat (10) @(posedge clk); #1;
    check(phase == PH_COPYING && n_samp == 2, "sampling waits for the copy");
    copy_reply(0);
    wait_pulse(record_ready, 0, "record_ready 2");
    wait_pulse(samp_start, 0, "late samp_start");
    check(phase == PH_SAMPLING, "sampling after late start");

    // CIT_ON drops in mid-window
    cit_on = 0;
    wait_pulse(flush, 3, "flush");
    check(phase == PH_IDLE, "idle after CIT_ON low");
    repeat (10) @(posedge clk); #1;
    check(n_flush == 1, "one flush");
    // a stray copy_done is ignored
    copy_done = 1; @(posedge clk); #1 copy_done = 0;
    repeat (3) @(posedge clk); #1;
    check(n_ready == 2, "stray copy_done ignored");
    check(n_samp == 3 && n_copy == 2, "pulse counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
