// tb_mem_switch: self-checking test of mem_switch. Drives random requests on
// all four inputs in every phase and checks which one reaches each memory.
module tb_mem_switch;
  import dps_pkg::*;

  phase_t    phase;
  sram_req_t il_req, cp_rd_req, cp_wr_req, ide_req, m1_req, m2_req;
  int checks = 0, failures = 0;

  mem_switch dut (.*);

  function automatic sram_req_t rnd();
    sram_req_t r;
    r.addr = AW'($urandom); r.we = 1'($urandom); r.re = 1'($urandom); r.wdata = DW'($urandom);
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 300; i++) begin
      phase = phase_t'(i % 3);
      il_req = rnd(); cp_rd_req = rnd(); cp_wr_req = rnd(); ide_req = rnd();
      #1;
      checks += 2;
      if (phase == PH_COPYING) begin
        if (m1_req != cp_rd_req) begin failures++; $display("FAIL m1 copy %0d", i); end
        if (m2_req != cp_wr_req) begin failures++; $display("FAIL m2 copy %0d", i); end
      end else begin
        if (m1_req != il_req)  begin failures++; $display("FAIL m1 sampling %0d", i); end
        if (m2_req != ide_req) begin failures++; $display("FAIL m2 sampling %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
