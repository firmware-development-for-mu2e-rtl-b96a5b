// tb_pcs_rx: checks word alignment and decoding of the receive side.
//
// The stimulus words are encoded by pcs_tx and turned into a bit stream in
// the testbench, which starts the stream at a chosen bit offset inside the
// 20-bit raw words, as an unaligned deserializer would. For each offset
// (0, 7, 13, 19):
//   a. a burst of ALIGN_COMMAS-1 comma words is sent, then data: the
//      aligner must not lock (too few consecutive commas);
//   b. after a word-aligner reset, ALIGN_COMMAS+2 comma words and then
//      300 random data words with some comma words mixed in: the lane must
//      lock, and every data word must come out unchanged, in order, with
//      K flags clear and no errors;
//   c. single bits of the stream are flipped: the decoder must flag a code
//      or disparity error.
module tb_pcs_rx;
  localparam int unsigned ALIGN = 4;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        wa_rst_n = 1'b1;
  logic [15:0] tx_data = 16'h5555;
  logic [1:0]  tx_k = 2'b00;
  logic [19:0] tx_code, rx_raw = '0;
  logic        aligned, rx_valid;
  logic [15:0] rx_data;
  logic [1:0]  rx_k, code_err, disp_err;
  int checks = 0, failures = 0;

  pcs_tx enc (.clk(clk), .rst_n(rst_n), .tx_data(tx_data), .tx_k(tx_k), .tx_code(tx_code));
  pcs_rx #(.ALIGN_COMMAS(ALIGN)) dut (
    .clk(clk), .rst_n(rst_n), .wa_rst_n(wa_rst_n), .rx_raw(rx_raw),
    .aligned(aligned), .rx_valid(rx_valid), .rx_data(rx_data), .rx_k(rx_k),
    .code_err(code_err), .disp_err(disp_err));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit          bitq[$];
  logic [15:0] expq[$];
  bit          flip_next = 0;
  bit          collect = 0;
  int          got = 0, errs_seen = 0, ever_aligned = 0;

  // Stream: encoder output -> bit queue -> raw words.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      for (int b = 19; b >= 0; b--) bitq.push_back(tx_code[b]);
      if (flip_next) begin
        bitq[bitq.size() - 13] = !bitq[bitq.size() - 13];
        flip_next = 0;
      end
    end
    if (aligned) ever_aligned++;
    if (code_err != 0 || disp_err != 0) errs_seen++;
    if (collect && rx_valid && rx_k == 2'b00) begin
      logic [15:0] e;
      e = expq.size() > 0 ? expq.pop_front() : 16'hxxxx;
      check(rx_data == e && code_err == 0 && disp_err == 0,
            $sformatf("got %h expected %h err %b/%b", rx_data, e, code_err, disp_err));
      got++;
    end
  end

  always @(negedge clk) begin
    if (bitq.size() >= 20) begin
      for (int b = 19; b >= 0; b--) rx_raw[b] = bitq.pop_front();
    end
  end

  task automatic send(input logic [15:0] d, input logic [1:0] k, input bit expect_it);
    @(negedge clk);
    tx_data = d;
    tx_k    = k;
    if (expect_it && k == 2'b00) expq.push_back(d);
  endtask

  task automatic restart(input int offset);
    @(negedge clk);
    tx_data  = 16'h5555;
    tx_k     = 2'b00;
    wa_rst_n = 1'b0;
    repeat (4) @(negedge clk);
    bitq.delete();
    expq.delete();
    for (int i = 0; i < offset; i++) bitq.push_back(1'b0);
    wa_rst_n = 1'b1;
  endtask

  int offsets[4] = '{0, 7, 13, 19};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (offsets[oi]) begin
      // a. too few commas
      restart(offsets[oi]);
      ever_aligned = 0;
      for (int i = 0; i < ALIGN - 1; i++) send(16'hB5BC, 2'b01, 0);
      for (int i = 0; i < 50; i++) send(16'h1234 + 16'(i), 2'b00, 0);
      repeat (5) send(16'h0101, 2'b00, 0);
      check(ever_aligned == 0, $sformatf("offset %0d: locked on %0d commas", offsets[oi], ALIGN - 1));

      // b. enough commas, then data
      restart(offsets[oi]);
      collect = 1;
      got = 0;
      for (int i = 0; i < ALIGN + 2; i++) send(16'hB5BC, 2'b01, 1);
      for (int i = 0; i < 300; i++) begin
        if ($urandom_range(0, 9) == 0) send(16'hB5BC, 2'b01, 1);
        else send(16'($urandom), 2'b00, 1);
      end
      repeat (4) send(16'hB5BC, 2'b01, 1);
      check(aligned, $sformatf("offset %0d: not aligned", offsets[oi]));
      check(expq.size() == 0 && got > 250,
            $sformatf("offset %0d: %0d words decoded, %0d missing", offsets[oi], got, expq.size()));
      collect = 0;

      // c. corrupted bits
      errs_seen = 0;
      for (int i = 0; i < 10; i++) begin
        send(16'($urandom), 2'b00, 0);
        flip_next = 1;
        repeat (3) send(16'($urandom), 2'b00, 0);
      end
      repeat (4) send(16'hB5BC, 2'b01, 0);
      check(errs_seen > 0, $sformatf("offset %0d: no error flagged on corrupted stream", offsets[oi]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
