// tb_sram_refresh: checks the clear slave. The testbench plays the SRAM
// writer: it keeps mem_full high until it has seen clr_n low for three
// clocks of its own (a 13 ns clock), then drops it.
//   1. During and right after PRESETn clr_n is low; it is released.
//   2. A write to offset 0 pulls clr_n low; clr_n stays low for at least
//      CLR_CYCLES PCLK cycles and until mem_full has fallen, and then
//      rises; reading offset 0 shows {clearing, mem_full} along the way.
//   3. A write to another offset does nothing.
//   4. 60 clears with mem_full held by the testbench for a random 0-20
//      PCLK cycles after the write: clr_n must stay low while mem_full is
//      high, for at least CLR_CYCLES cycles, not rise sooner than the
//      two-flop synchronizer allows after mem_full falls, and rise within
//      four cycles of the later of the two.
module tb_sram_refresh;
  import drac_pkg::*;
  localparam int unsigned CLR = 8;
  logic     PCLK = 1'b0, PRESETn = 1'b0, wclk = 1'b0;
  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic     mem_full = 1'b0, clr_n;
  int checks = 0, failures = 0;
  int low_pclk = 0, low_wclk = 0;
  bit manual = 0;

  sram_refresh #(.CLR_CYCLES(CLR)) dut (.PCLK(PCLK), .PRESETn(PRESETn),
    .apb_req(req), .apb_rsp(rsp), .mem_full(mem_full), .clr_n(clr_n));

  `include "apb_bfm.svh"

  always #5 PCLK = ~PCLK;
  always #6.5 wclk = ~wclk;

  // Writer model: memory is cleared after three of its clocks of clr_n low.
  always @(posedge wclk) begin
    if (!clr_n) low_wclk++;
    else low_wclk = 0;
    if (!manual && low_wclk >= 3) mem_full <= 1'b0;
  end
  always @(posedge PCLK) begin
    if (!clr_n) low_pclk++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic        e;
    repeat (2) @(negedge PCLK);
    check(!clr_n, "clr_n high during reset");
    PRESETn = 1'b1;
    repeat (30) @(negedge PCLK);
    check(clr_n, "clr_n not released after reset");
    apb_read(32'h0, d, e);
    check(d == 32'h0 && !e, $sformatf("status after reset %h", d));

    // memory fills up
    mem_full = 1'b1;
    repeat (5) @(negedge PCLK);
    apb_read(32'h0, d, e);
    check(d == 32'h1, $sformatf("status when full %h", d));
    apb_write(32'h4, 32'h1);
    repeat (5) @(negedge PCLK);
    check(clr_n && mem_full, "write to another offset started a clear");

    low_pclk = 0;
    apb_write(32'h0, 32'h0);
    check(!clr_n, "clr_n not low after the write");
    apb_read(32'h0, d, e);
    check(d[1] == 1'b1, $sformatf("status while clearing %h", d));
    repeat (40) @(negedge PCLK);
    check(clr_n && !mem_full, $sformatf("clear not finished: clr_n %b mem_full %b", clr_n, mem_full));
    check(low_pclk >= CLR, $sformatf("clr_n low for only %0d PCLK cycles", low_pclk));
    apb_read(32'h0, d, e);
    check(d == 32'h0, $sformatf("status after clear %h", d));

    // writer slow to clear: clr_n must wait for mem_full
    mem_full = 1'b1;
    repeat (5) @(negedge PCLK);
    force mem_full = 1'b1;
    low_pclk = 0;
    apb_write(32'h0, 32'h0);
    repeat (40) @(negedge PCLK);
    check(!clr_n, "clr_n released while memory still full");
    release mem_full;
    mem_full = 1'b0;
    repeat (10) @(negedge PCLK);
    check(clr_n, "clr_n not released once memory empty");

    manual = 1;
    for (int i = 0; i < 60; i++) begin
      int dly, t, lim;
      dly = $urandom_range(0, 20);
      mem_full = 1'b1;
      repeat (4) @(negedge PCLK);
      low_pclk = 0;
      apb_write(32'h0, 32'h0);
      repeat (dly) @(negedge PCLK);
      check(!clr_n, $sformatf("clear %0d: clr_n high while memory full", i));
      mem_full = 1'b0;
      t = 0;
      while (!clr_n && t < 60) begin
        @(negedge PCLK);
        t++;
      end
      lim = (CLR > dly ? CLR - dly : 0) + 4;
      check(clr_n, $sformatf("clear %0d: clr_n never released", i));
      check(low_pclk >= CLR, $sformatf("clear %0d: clr_n low for %0d cycles", i, low_pclk));
      check(t >= 2, $sformatf("clear %0d: released %0d cycles after mem_full fell", i, t));
      check(t <= lim, $sformatf("clear %0d: released after %0d cycles, limit %0d", i, t, lim));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
