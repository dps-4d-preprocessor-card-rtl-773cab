// tb_copy_engine: self-checking test of copy_engine with two SRAM models.
// Fills Memory 1 with a pattern at the sorted addresses of a record of H
// heights (and different values elsewhere), runs a copy, and checks that
// Memory 2 holds exactly those words at the same addresses and nothing
// else, that done rises 16*H + 1 clock edges after the edge that takes start, and that a
// copy of zero heights finishes at once.
module tb_copy_engine;
  import dps_pkg::*;

  logic clk = 0, reset = 1, start = 0;
  logic [HGT_W:0] heights = '0;
  sram_req_t m1_req, m2_req, m1_drive;
  logic [DW-1:0] m1_rdata, m2_rdata;
  logic busy, done;
  logic preload = 1;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  copy_engine dut (.clk, .reset, .start, .heights, .m1_req, .m1_rdata, .m2_req, .busy, .done);
  assign m1_drive = preload ? SRAM_IDLE : m1_req;
  sram_model u_m1 (.clk, .req(m1_drive), .rdata(m1_rdata));
  sram_model u_m2 (.clk, .req(m2_req),   .rdata(m2_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic logic [DW-1:0] pattern(int a);
    return DW'(a * 7 + 3) ^ DW'(a >> 5);
  endfunction

  function automatic bit in_record(int a, int h);
    // sorted layout: bit17 freq, 16:15 ant, 14:11 zero, 10:1 height, 0 q
    return ((a >> 11) & 4'hF) == 0 && ((a >> 1) & 10'h3FF) < h;
  endfunction

  task automatic run_copy(input int h);
    int k;
    for (int a = 0; a < (1 << AW); a++) begin
      u_m1.mem[a] = pattern(a);
      u_m2.mem[a] = 16'hDEAD;
    end
    @(posedge clk); #1;
    preload = 0;
    heights = (HGT_W+1)'(h); start = 1;
    @(posedge clk); #1 start = 0;
    k = 0;
    while (!done && k < 20000) begin @(posedge clk); #1 k++; end
    check(k == ((h == 0) ? 0 : 16 * h + 1),
          $sformatf("copy of %0d heights: done %0d clocks after start", h, k));
    check(!busy, "not busy after done");
    preload = 1;
    for (int a = 0; a < (1 << AW); a++) begin
      if (in_record(a, h)) begin
        if (u_m2.mem[a] != pattern(a)) begin
          check(0, $sformatf("word at %h not copied", a)); break;
        end
      end else if (u_m2.mem[a] != 16'hDEAD) begin
        check(0, $sformatf("word at %h written outside record", a)); break;
      end
    end
    check(u_m2.writes == 16 * h, $sformatf("%0d writes for %0d heights", u_m2.writes, h));
    u_m2.writes = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 reset = 0;
    run_copy(256);
    run_copy(3);
    run_copy(0);
    run_copy(1023);
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
