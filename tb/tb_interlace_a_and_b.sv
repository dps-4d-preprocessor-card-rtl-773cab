// tb_interlace_a_and_b: self-checking test of interlace_a_and_b.
// Offers random A/B word pairs with random delays and checks, for every
// write, the address against the sorted layout {freq, antenna, 0000, height,
// q} computed here from an independent word count, the data (A for
// frequency 1, B for frequency 2), the two-clock strobe with steady address
// and data, and the cycle timing: A strobe one clock after acceptance, B
// strobe seven clocks after A, next acceptance at least 15 clocks later.
module tb_interlace_a_and_b;
  import dps_pkg::*;

  logic clk = 0, reset = 1, clear = 0, rdy_in = 0;
  logic [DW-1:0] data_a = '0, data_b = '0;
  logic take, rdy_out, idle;
  logic [AW-1:0] addr;
  logic [DW-1:0] w_data;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  interlace_a_and_b dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // expected sorted address of the n-th word written since clear
  function automatic logic [AW-1:0] exp_addr(int n);
    int f, q, ant, h;
    f   = n % 2;
    q   = (n / 2) % 2;
    ant = (n / 4) % 4;
    h   = (n / 16) % 1024;
    return AW'(f * 'h20000 + ant * 'h08000 + h * 2 + q);
  endfunction

  logic [DW-1:0] qa[$], qb[$];
  int   nwr = 0;           // words written (strobe pulses seen)
  longint take_cyc = -100, last_take = -100, a_rise = 0;
  logic rdy_q = 0;
  logic [AW-1:0] addr_q;
  logic [DW-1:0] data_q;
  int   hi_len = 0;

  // monitor the write strobe
  always @(posedge clk) if (!reset) begin
    rdy_q <= rdy_out;
    if (take) begin
      check(cyc - last_take >= 15, "pair spacing >= 15 clocks");
      last_take = cyc;
    end
    if (rdy_out && !rdy_q) begin
      logic [DW-1:0] e;
      hi_len = 1;
      addr_q <= addr; data_q <= w_data;
      check(addr == exp_addr(nwr), $sformatf("addr %h expected %h (word %0d)", addr, exp_addr(nwr), nwr));
      if (nwr % 2 == 0) begin
        e = qa.pop_front();
        check(cyc - last_take == 1, "A strobe one clock after take");
        a_rise = cyc;
      end else begin
        e = qb.pop_front();
        check(cyc - a_rise == 7, "B strobe seven clocks after A");
      end
      check(w_data == e, $sformatf("data %h expected %h", w_data, e));
      nwr++;
    end else if (rdy_out) begin
      hi_len++;
      check(addr == addr_q && w_data == data_q, "address/data steady during strobe");
    end else if (rdy_q) begin
      check(hi_len == 2, "strobe two clocks long");
    end
  end

  // source: offer a pair, hold it until taken, then change the inputs
  task automatic offer_pairs(input int n);
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(0, 6)) @(posedge clk);
      #1;
      data_a = 16'($urandom); data_b = 16'($urandom);
      qa.push_back(data_a); qb.push_back(data_b);
      rdy_in = 1;
      do @(posedge clk); while (!take);
      #1 rdy_in = 0;
      data_a = 16'($urandom); data_b = 16'($urandom); // inputs may change after take
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 reset = 0;
    offer_pairs(300);
    repeat (20) @(posedge clk);
    check(nwr == 600, $sformatf("600 words written, saw %0d", nwr));
    check(count == 600, "count = words written");
    check(idle, "idle after last pair");
    // clear restarts the sorted layout at address 0
    #1 clear = 1; @(posedge clk); #1 clear = 0;
    nwr = 0;
    check(count == 0, "count cleared");
    offer_pairs(40);
    repeat (20) @(posedge clk);
    check(nwr == 80, "80 words after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
