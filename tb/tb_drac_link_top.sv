// tb_drac_link_top: the whole four-lane link, end to end, with every
// parameter at its default (64-word SRAMs, 16-word comma bursts every 256
// data words, lock after 4 commas, 16-deep FIFOs, one sample per word).
// Bit clock 2.5 GHz (word clock 125 MHz), PCLK 100 MHz, adc_clk 40 MHz.
//
//  1. Loopback, pattern generator on all lanes: every lane must lock, fill
//     its SRAM and read back over APB as the counting pattern from 0:
//     SRAM word n = {2n+1, 2n+1, 2n, 2n} (bytes).
//  2. Lane 2 switched to the digitizer path; its SRAM is cleared over APB
//     and 128 random samples are fed on adc_clk: the SRAM must hold them
//     in order as {seq, sample} halves. Lane 3 gets samples while its
//     source is the pattern generator, so its FIFO must overflow.
//  3. Loopback off: each lane receives its own output through a delay of
//     0, 5, 11 or 17 bits added here; after a word-aligner reset every lane
//     must lock again (the pattern lanes at their next comma burst), and
//     after a clear lanes 0, 1 and 3 must capture a new run of consecutive
//     counts.
//  4. A bit of lane 1's stream is flipped: an error flag must rise.
//  5. An APB read past the last lane must return PSLVERR.
// Each of these mechanisms is counted and must happen at least once.
module tb_drac_link_top;
  import drac_pkg::*;
  localparam int NL = 4;

  logic                ser_clk = 1'b0, ser_rst_n = 1'b0, rst_n = 1'b0, wa_rst_n = 1'b1, loopback = 1'b1;
  logic [NL-1:0]       src_adc = '0, ser_tx, ser_rx, tx_clk, rx_clk;
  logic                adc_clk = 1'b0;
  logic [NL-1:0]       adc_valid = '0;
  logic [NL-1:0][11:0] adc_data = '0;
  logic [NL-1:0]       fifo_overflow, aligned, memory_full;
  logic [NL-1:0][1:0]  code_err, disp_err, tx_invalid_k;
  logic                PCLK = 1'b0, PRESETn = 1'b0;
  apb_req_t            req = '0;
  apb_rsp_t            rsp;
  int checks = 0, failures = 0;

  drac_link_top dut (
    .ser_clk(ser_clk), .ser_rst_n(ser_rst_n), .rst_n(rst_n), .wa_rst_n(wa_rst_n), .loopback(loopback),
    .src_adc(src_adc), .ser_tx(ser_tx), .ser_rx(ser_rx), .tx_clk(tx_clk), .rx_clk(rx_clk),
    .adc_clk(adc_clk), .adc_valid(adc_valid), .adc_data(adc_data),
    .fifo_overflow(fifo_overflow), .aligned(aligned), .code_err(code_err),
    .disp_err(disp_err), .tx_invalid_k(tx_invalid_k), .memory_full(memory_full),
    .PCLK(PCLK), .PRESETn(PRESETn), .apb_req(req), .apb_rsp(rsp));

  `include "apb_bfm.svh"

  always #0.2  ser_clk = ~ser_clk;
  always #5    PCLK    = ~PCLK;
  always #12.5 adc_clk = ~adc_clk;

  // External serial path: per-lane delay line and a one-shot bit flip.
  int          delay_bits [NL] = '{0, 5, 11, 17};
  logic [31:0] line [NL];
  bit          flip_lane1 = 0;
  for (genvar n = 0; n < NL; n++) begin : g_line
    always @(posedge ser_clk) line[n] <= {line[n][30:0], ser_tx[n]};
    assign ser_rx[n] = (delay_bits[n] == 0 ? ser_tx[n] : line[n][delay_bits[n]-1]) ^
                       (n == 1 && flip_lane1);
  end

  // Mechanism counters.
  int n_lock = 0, n_full = 0, n_clear = 0, n_relock = 0, n_adc_words = 0;
  int n_overflow = 0, n_err_flag = 0, n_slverr = 0, n_offset_lock = 0;
  logic [NL-1:0] aligned_q = '0, full_q = '0;
  always @(posedge PCLK) begin
    for (int n = 0; n < NL; n++) begin
      if (aligned[n] && !aligned_q[n]) n_lock++;
      if (memory_full[n] && !full_q[n]) n_full++;
    end
    aligned_q <= aligned;
    full_q    <= memory_full;
  end
  always @(posedge rx_clk[1]) if (code_err[1] != 0 || disp_err[1] != 0) n_err_flag++;
  int n_invalid_k = 0;
  always @(posedge tx_clk[0]) if (rst_n && tx_invalid_k != '0) n_invalid_k++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #400us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MW = 64;
  logic [31:0] mem [NL][MW];

  task automatic read_lane(input int n);
    logic [31:0] d;
    logic        e;
    for (int a = 0; a < MW; a++) begin
      apb_read(32'(n) * 32'h400 + 32'(a) * 4, d, e);
      mem[n][a] = d;
      check(!e, "PSLVERR on an SRAM read");
    end
  endtask

  task automatic clear_lane(input int n);
    logic [31:0] d;
    logic        e;
    apb_write(32'(n) * 32'h400 + 32'h100, 32'h0);
    n_clear++;
    repeat (20) @(negedge PCLK);
    apb_read(32'(n) * 32'h400 + 32'h100, d, e);
    check(d == 32'h0, $sformatf("lane %0d status %h after clear", n, d));
  endtask

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

  // Consecutive counts: every byte pair equal, each half one above the last.
  task automatic check_counting(input int n);
    logic [7:0] c;
    c = mem[n][0][7:0];
    for (int a = 0; a < MW; a++) begin
      logic [31:0] e;
      e = {c + 8'd1, c + 8'd1, c, c};
      check(mem[n][a] == e, $sformatf("lane %0d word %0d = %h expected %h", n, a, mem[n][a], e));
      c = c + 8'd2;
    end
  endtask

  logic [11:0] samples[$];

  initial begin
    logic [31:0] d;
    logic        e;
    repeat (3) @(negedge PCLK);
    ser_rst_n = 1'b1;
    PRESETn   = 1'b1;
    repeat (20) @(negedge PCLK);
    rst_n = 1'b1;

    // 1. loopback with the test pattern
    wait_for('1, 0, 2000);
    wait_for('1, 1, 5000);
    for (int n = 0; n < NL; n++) begin
      read_lane(n);
      for (int a = 0; a < MW; a++) begin
        logic [7:0] lo;
        lo = 8'(2 * a);
        check(mem[n][a] == {lo + 8'd1, lo + 8'd1, lo, lo},
              $sformatf("lane %0d word %0d = %h", n, a, mem[n][a]));
      end
    end

    // 2. digitizer path on lane 2, overflow on lane 3
    src_adc[2] = 1'b1;
    repeat (50) @(negedge PCLK);
    clear_lane(2);
    for (int i = 0; i < 2 * MW; i++) begin
      @(negedge adc_clk);
      adc_valid = '0;
      repeat ($urandom_range(0, 2)) @(negedge adc_clk);
      adc_valid[2] = 1'b1;
      adc_valid[3] = 1'b1;
      adc_data[2]  = 12'($urandom);
      adc_data[3]  = 12'($urandom);
      samples.push_back(adc_data[2]);
    end
    @(negedge adc_clk);
    adc_valid = '0;
    wait_for(4'b0100, 1, 2000);
    read_lane(2);
    for (int a = 0; a < MW; a++) begin
      logic [15:0] w0, w1;
      w0 = mem[2][a][15:0];
      w1 = mem[2][a][31:16];
      check(w0 == {4'(2 * a), samples[2 * a]} && w1 == {4'(2 * a + 1), samples[2 * a + 1]},
            $sformatf("lane 2 word %0d = %h", a, mem[2][a]));
      n_adc_words += 2;
    end
    check(fifo_overflow == 4'b1000, $sformatf("fifo_overflow %b", fifo_overflow));
    if (fifo_overflow[3]) n_overflow++;

    // 3. external path with bit offsets
    loopback = 1'b0;
    @(negedge tx_clk[0]);
    wa_rst_n = 1'b0;
    repeat (3) @(negedge tx_clk[0]);
    wa_rst_n = 1'b1;
    check(aligned == '0, "alignment kept through a word-aligner reset");
    wait_for('1, 0, 5000);
    if (aligned == '1) n_relock += NL;
    for (int n = 0; n < NL; n++) if (delay_bits[n] % 20 != 0 && aligned[n]) n_offset_lock++;
    for (int n = 0; n < NL; n++) if (n != 2) clear_lane(n);
    wait_for(4'b1011, 1, 5000);
    for (int n = 0; n < NL; n++) begin
      if (n != 2) begin
        read_lane(n);
        check_counting(n);
      end
    end
    check(code_err == '0 && disp_err == '0, "errors on a clean link");

    // 4. a flipped bit
    @(posedge ser_clk);
    flip_lane1 = 1;
    @(posedge ser_clk);
    flip_lane1 = 0;
    repeat (10) @(negedge tx_clk[1]);
    check(n_err_flag > 0, "flipped bit not flagged");

    // 5. bus error
    apb_read(32'h1000, d, e);
    check(e, "no PSLVERR past the last lane");
    if (e) n_slverr++;

    $display("mechanisms: lock %0d, full %0d, clear %0d, relock %0d, offset lock %0d, adc words %0d, overflow %0d, error flag %0d, slverr %0d",
             n_lock, n_full, n_clear, n_relock, n_offset_lock, n_adc_words, n_overflow, n_err_flag, n_slverr);
    check(n_lock > 0, "no lock");
    check(n_full > 0, "memory never full");
    check(n_clear > 0, "no clear");
    check(n_relock > 0, "no relock");
    check(n_offset_lock > 0, "no lock at a bit offset");
    check(n_adc_words > 0, "no digitizer words");
    check(n_overflow > 0, "no FIFO overflow");
    check(n_err_flag > 0, "no error flag");
    check(n_invalid_k == 0, "a word source sent an invalid control symbol");
    check(n_slverr > 0, "no bus error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
