// tb_serdes_lane: checks serialization and deserialization.
//
// Random 20-bit words are given to tx_par on each rising edge of tx_clk.
//   1. The word clocks run at 1/20 of the bit clock.
//   2. Loopback: the word given at tx_clk edge n is in rx_par at rx_clk
//      edge n+2, bit for bit (the deserializer happens to be aligned).
//   3. External path with a 3-bit delay added here between ser_tx and
//      ser_rx: rx_par at edge n+2 is the stream shifted by 3 bits,
//      {word n-1 [2:0], word n [19:3]}.
//   4. ser_tx carries the word most significant bit first.
module tb_serdes_lane;
  logic        ser_clk = 1'b0, rst_n = 1'b0, loopback = 1'b1;
  logic [19:0] tx_par = '0, rx_par;
  logic        tx_clk, rx_clk, ser_tx, ser_rx;
  logic [2:0]  dly = '0;
  int checks = 0, failures = 0;

  serdes_lane dut (.ser_clk(ser_clk), .rst_n(rst_n), .loopback(loopback),
    .tx_par(tx_par), .tx_clk(tx_clk), .ser_tx(ser_tx), .ser_rx(ser_rx),
    .rx_par(rx_par), .rx_clk(rx_clk));

  always #1 ser_clk = ~ser_clk;
  always @(posedge ser_clk) dly <= {dly[1:0], ser_tx};
  assign ser_rx = dly[2];

  initial begin
    repeat (100000) @(posedge ser_clk);
    failures++;
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

  logic [19:0] sent[$];
  int          nword = 0;
  realtime     last_edge = -1.0;
  int          switch_at = 1 << 30;
  logic [19:0] bits_seen;

  // Drive a new word and check the received one at every word clock edge.
  always @(posedge tx_clk) begin
    logic [19:0] w;
    // The bit clock period is 2 time units.
    if (nword >= 2) check($realtime - last_edge == 40.0,
                              $sformatf("word period %0t", $realtime - last_edge));
    last_edge = $realtime;
    #0.5;
    if (nword >= 3 && (nword < switch_at || nword >= switch_at + 3)) begin
      if (loopback)
        check(rx_par == sent[nword-2], $sformatf("loopback word %0d: %h expected %h", nword, rx_par, sent[nword-2]));
      else
        check(rx_par == {sent[nword-3][2:0], sent[nword-2][19:3]},
              $sformatf("delayed word %0d: %h", nword, rx_par));
    end
    w = 20'($urandom);
    tx_par = w;
    sent.push_back(w);
    nword++;
  end

  // Bit order on the wire: the word given at a tx_clk edge is loaded on
  // the 11th bit clock after it and leaves most significant bit first.
  initial begin
    logic [19:0] w;
    @(posedge rst_n);
    wait (nword == 5);
    @(posedge tx_clk);
    #0.7;
    w = tx_par;
    repeat (11) @(posedge ser_clk);
    for (int b = 19; b >= 0; b--) begin
      #0.2;
      bits_seen[b] = ser_tx;
      @(posedge ser_clk);
    end
    check(bits_seen == w, $sformatf("wire bits %h expected %h", bits_seen, w));
  end

  initial begin
    repeat (5) @(posedge ser_clk);
    rst_n = 1'b1;
    wait (nword == 200);
    switch_at = nword;
    loopback = 1'b0;
    wait (nword == 400);
    check(rx_clk === tx_clk, "rx_clk and tx_clk are the same clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
