// tb_link_eight_lanes: the link as a readout controller taking both
// digitizer FPGAs at once: eight lanes (two four-lane interfaces), run at
// 100 MHz words (2 Gb/s per lane, bit clock 2 GHz), with the second way of
// packing digitizer samples (PACK_MODE = 1, four 12-bit samples in three
// words).
//
//  1. Loopback; lanes 0-6 send the test pattern, lane 7 the digitizer path
//     from reset (idle commas until samples come). All eight lanes must
//     lock; lanes 0-6 must fill and read back the counting pattern from 0
//     over APB at their windows 0x400*n.
//  2. 172 random samples are written into lane 7's FIFO at 40 MHz. Its SRAM
//     must hold the first 2048 bits of the samples laid end to end, first
//     sample in the lowest bits: 64 words of 32 bits, two 16-bit link words
//     each. The FIFO must not overflow.
//  3. An APB read at 0x2000, past lane 7, must return PSLVERR.
// Each mechanism is counted and must happen at least once.
module tb_link_eight_lanes;
  import drac_pkg::*;
  localparam int NL = 8;
  localparam int MW = 64;
  localparam int NS = 172;

  logic                ser_clk = 1'b0, ser_rst_n = 1'b0, rst_n = 1'b0, wa_rst_n = 1'b1, loopback = 1'b1;
  logic [NL-1:0]       src_adc = 8'h80, ser_tx, ser_rx, tx_clk, rx_clk;
  logic                adc_clk = 1'b0;
  logic [NL-1:0]       adc_valid = '0;
  logic [NL-1:0][11:0] adc_data = '0;
  logic [NL-1:0]       fifo_overflow, aligned, memory_full;
  logic [NL-1:0][1:0]  code_err, disp_err, tx_invalid_k;
  logic                PCLK = 1'b0, PRESETn = 1'b0;
  apb_req_t            req = '0;
  apb_rsp_t            rsp;
  int checks = 0, failures = 0;

  drac_link_top #(.N_LANES(NL), .PACK_MODE(1)) dut (
    .ser_clk(ser_clk), .ser_rst_n(ser_rst_n), .rst_n(rst_n), .wa_rst_n(wa_rst_n), .loopback(loopback),
    .src_adc(src_adc), .ser_tx(ser_tx), .ser_rx(ser_rx), .tx_clk(tx_clk), .rx_clk(rx_clk),
    .adc_clk(adc_clk), .adc_valid(adc_valid), .adc_data(adc_data),
    .fifo_overflow(fifo_overflow), .aligned(aligned), .code_err(code_err),
    .disp_err(disp_err), .tx_invalid_k(tx_invalid_k), .memory_full(memory_full),
    .PCLK(PCLK), .PRESETn(PRESETn), .apb_req(req), .apb_rsp(rsp));

  `include "apb_bfm.svh"

  always #0.25 ser_clk = ~ser_clk;
  always #5    PCLK    = ~PCLK;
  always #12.5 adc_clk = ~adc_clk;
  assign ser_rx = ser_tx;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_lock = 0, n_full = 0, n_packed = 0, n_slverr = 0, n_errs = 0;
  logic [NL-1:0] aligned_q = '0, full_q = '0;
  always @(posedge PCLK) begin
    for (int n = 0; n < NL; n++) begin
      if (aligned[n] && !aligned_q[n]) n_lock++;
      if (memory_full[n] && !full_q[n]) n_full++;
    end
    aligned_q <= aligned;
    full_q    <= memory_full;
    if (rst_n && (code_err != '0 || disp_err != '0 || tx_invalid_k != '0)) n_errs++;
  end

  // Word-clock period: 20 bit clocks of 0.5 ns.
  realtime t_last = 0, period = 0;
  always @(posedge tx_clk[0]) begin
    period = $realtime - t_last;
    t_last = $realtime;
  end

  task automatic wait_for(input logic [NL-1:0] mask, input bit full, input int max_ns);
    int t;
    t = 0;
    while (((full ? memory_full : aligned) & mask) != mask && t < max_ns) begin
      #10;
      t += 10;
    end
    check(((full ? memory_full : aligned) & mask) == mask,
          $sformatf("%s not reached: %b", full ? "memory_full" : "aligned",
                    full ? memory_full : aligned));
  endtask

  logic [11:0] samples [NS];

  initial begin
    logic [31:0] d;
    logic        e;
    repeat (3) @(negedge PCLK);
    ser_rst_n = 1'b1;
    PRESETn   = 1'b1;
    repeat (20) @(negedge PCLK);
    rst_n = 1'b1;

    // 1. all lanes lock; the pattern lanes fill and read back
    wait_for('1, 0, 2000);
    check(period == 10.0, $sformatf("word clock period %0t", period));
    wait_for(8'h7F, 1, 5000);
    for (int n = 0; n < NL - 1; n++) begin
      for (int a = 0; a < MW; a++) begin
        logic [7:0] lo;
        apb_read(32'(n) * 32'h400 + 32'(a) * 4, d, e);
        lo = 8'(2 * a);
        check(!e && d == {lo + 8'd1, lo + 8'd1, lo, lo},
              $sformatf("lane %0d word %0d = %h", n, a, d));
      end
    end
    check(memory_full[7] == 1'b0, "lane 7 stored idle words");

    // 2. samples through lane 7, packed four into three words
    foreach (samples[i]) samples[i] = 12'($urandom);
    foreach (samples[i]) begin
      @(negedge adc_clk);
      adc_valid[7] = 1'b1;
      adc_data[7]  = samples[i];
    end
    @(negedge adc_clk);
    adc_valid[7] = 1'b0;
    wait_for(8'h80, 1, 5000);
    check(fifo_overflow == '0, "FIFO overflow");
    for (int a = 0; a < MW; a++) begin
      logic [31:0] x;
      for (int b = 0; b < 32; b++) begin
        int bit_no;
        bit_no = 32 * a + b;
        x[b] = samples[bit_no / 12][bit_no % 12];
      end
      apb_read(32'h1C00 + 32'(a) * 4, d, e);
      check(!e && d == x, $sformatf("lane 7 word %0d = %h expected %h", a, d, x));
      if (!e && d == x) n_packed++;
    end

    // 3. past the last lane
    apb_read(32'h2000, d, e);
    check(e, "no PSLVERR past lane 7");
    if (e) n_slverr++;

    $display("mechanisms: lock %0d, full %0d, packed words %0d, slverr %0d",
             n_lock, n_full, n_packed, n_slverr);
    check(n_lock == NL, "not every lane locked");
    check(n_full == NL, "not every lane filled");
    check(n_packed == MW, "packed words");
    check(n_slverr > 0, "no PSLVERR");
    check(n_errs == 0, "error flags on a clean link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
