// tb_pcs_tx: checks the 8b/10b encoder against published code words and
// against the properties of the code.
//
// 1. Known words from reset: K28.5 K28.5 at RD- gives 0011111010 then
//    1100000101; D21.5 is 1010101010 at either disparity; D0.0 at RD- is
//    100111 0100; D7.7 after RD- sequences.
// 2. 4000 random words (random K28.5 inserted): every symbol has 4, 5 or 6
//    ones, an unbalanced symbol always flips the running disparity the
//    testbench tracks itself (so the disparity never leaves +-1), the
//    stream never holds more than 5 equal bits in a row, and no comma
//    (0011111 / 1100000) appears anywhere in the bit stream except at the
//    start of a K28.5 symbol.
// 3. Latency: the code appears one clock after the word.
// 4. Forced disparity: K28.5 coded at the disparity disp_sel selects, for
//    byte 0 and for byte 1, with the running disparity carried on from the
//    forced symbol.
// 5. invalid_k: all 256 byte values sent as K symbols in either byte; only
//    the twelve control values (1C 3C 5C 7C 9C BC DC FC F7 FB FD FE) pass.

module tb_pcs_tx;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] tx_data = '0;
  logic [1:0]  tx_k = '0;
  logic [1:0]  force_disp = '0, disp_sel = '0;
  logic [19:0] tx_code;
  logic [1:0]  invalid_k;
  int checks = 0, failures = 0;

  pcs_tx dut (.clk(clk), .rst_n(rst_n), .tx_data(tx_data), .tx_k(tx_k),
              .force_disp(force_disp), .disp_sel(disp_sel),
              .tx_code(tx_code), .invalid_k(invalid_k));

  localparam logic [7:0] KLIST [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                        8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic send(input logic [15:0] d, input logic [1:0] k);
    @(negedge clk);
    tx_data = d;
    tx_k    = k;
    @(posedge clk);
    #1;
  endtask

  int   rd;              // running disparity tracked here: -1 or +1
  int   run_len;
  logic last_bit;
  logic [6:0] hist;      // last 7 stream bits
  int   nbits;

  // Walks the 20 bits of one code word through the property checks.
  task automatic check_word(input logic [19:0] c, input logic [1:0] k);
    for (int s = 0; s < 2; s++) begin
      logic [9:0] sym;
      int ones;
      sym  = s == 0 ? c[19:10] : c[9:0];
      ones = $countones(sym);
      check(ones >= 4 && ones <= 6, $sformatf("symbol %b has %0d ones", sym, ones));
      if (ones == 6) begin
        check(rd == -1, "positive symbol at positive disparity");
        rd = 1;
      end else if (ones == 4) begin
        check(rd == 1, "negative symbol at negative disparity");
        rd = -1;
      end
      for (int b = 9; b >= 0; b--) begin
        hist = {hist[5:0], sym[b]};
        nbits++;
        if (nbits > 1 && sym[b] == last_bit) run_len++;
        else run_len = 1;
        last_bit = sym[b];
        if (run_len > 5) begin
          failures++;
          $display("FAIL: run of %0d equal bits", run_len);
        end
        // A comma ends at bit position 3 of a K28.5 symbol (b == 3).
        if (nbits >= 7 && (hist == 7'b0011111 || hist == 7'b1100000)) begin
          checks++;
          if (!(b == 3 && k[s] == 1'b1 && sym[9:4] inside {6'b001111, 6'b110000})) begin
            failures++;
            $display("FAIL: comma at a wrong place, bit %0d", b);
          end
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    send(16'hBCBC, 2'b11);
    check(tx_code == 20'b0011111010_1100000101, $sformatf("K28.5 K28.5 = %b", tx_code));
    send(16'hB5B5, 2'b00);
    check(tx_code == 20'b1010101010_1010101010, $sformatf("D21.5 D21.5 = %b", tx_code));
    send(16'h0000, 2'b00);
    check(tx_code == 20'b1001110100_1001110100, $sformatf("D0.0 D0.0 = %b", tx_code));
    send(16'hBCBC, 2'b11);
    check(tx_code == 20'b0011111010_1100000101, $sformatf("K28.5 again = %b", tx_code));
    // D3.0 at RD-: 110001 1011 (neutral 6b, unbalanced 4b) then D3.0 at RD+: 110001 0100
    send(16'h0303, 2'b00);
    check(tx_code == 20'b1100011011_1100010100, $sformatf("D3.0 D3.0 = %b", tx_code));

    check(invalid_k == 2'b00, "invalid_k on valid symbols");

    // Forced disparity, from reset (running disparity negative).
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    force_disp = 2'b01; disp_sel = 2'b01;
    send(16'hBCBC, 2'b11);
    // byte 0 forced to RD+: 1100000101 (RD- after), byte 1 at RD-: 0011111010
    check(tx_code == 20'b1100000101_0011111010, $sformatf("forced byte 0 = %b", tx_code));
    force_disp = 2'b10; disp_sel = 2'b00;
    send(16'hBCBC, 2'b11);
    // byte 0 at RD+ carried on: 1100000101, byte 1 forced to RD-: 0011111010
    check(tx_code == 20'b1100000101_0011111010, $sformatf("forced byte 1 = %b", tx_code));
    force_disp = 2'b00;
    send(16'hBCBC, 2'b11);
    // running disparity RD+ after the forced byte 1
    check(tx_code == 20'b1100000101_0011111010, $sformatf("after forcing = %b", tx_code));

    // invalid_k for every byte value, in byte 0 and in byte 1.
    for (int v = 0; v < 256; v++) begin
      logic good;
      good = 1'b0;
      foreach (KLIST[j]) if (KLIST[j] == 8'(v)) good = 1'b1;
      send({8'(v), 8'hBC}, 2'b11);
      check(invalid_k == {!good, 1'b0}, $sformatf("invalid_k byte 1 %02h: %b", v, invalid_k));
      send({8'hF7, 8'(v)}, 2'b11);
      check(invalid_k == {1'b0, !good}, $sformatf("invalid_k byte 0 %02h: %b", v, invalid_k));
      send({8'(v), 8'(v)}, 2'b00);
      check(invalid_k == 2'b00, "invalid_k on data");
    end

    // Property checks on a random stream; disparity tracked from reset.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    rd = -1; run_len = 0; nbits = 0; hist = '0; last_bit = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] d;
      logic [1:0]  k;
      d = 16'($urandom);
      k = 2'b00;
      if ($urandom_range(0, 7) == 0) begin k[0] = 1'b1; d[7:0] = 8'hBC; end
      if ($urandom_range(0, 7) == 0) begin k[1] = 1'b1; d[15:8] = 8'hBC; end
      send(d, k);
      check_word(tx_code, k);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
