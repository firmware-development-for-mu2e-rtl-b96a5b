// serdes_lane: serializer/deserializer for one lane of 20-bit words.
//
// Transmit (PISO): a 20-bit shift register is loaded with tx_par once per
// word and shifted out, most significant bit first, on every ser_clk.
// Receive (SIPO): a 20-bit shift register takes one bit per ser_clk and
// its content is copied to rx_par once per word. rx_par therefore holds
// 20 consecutive bits with no knowledge of symbol boundaries; finding the
// boundary is the word aligner's job.
//
// ser_clk is the bit clock (2.5 GHz on the board, 125 MHz words). The
// lane divides it by 20 to make the word clocks tx_clk and rx_clk, whose
// rising edge comes when the word counter returns to 0. tx_par is sampled
// and rx_par updated half a word later (count 10), so both are stable
// around the word-clock edges. When loopback is high the receiver takes
// the transmitted bit, as the link's built-in loopback does; otherwise it
// takes ser_rx. The receiver is assumed to run on the same bit clock as
// the transmitter: clock-data recovery from the received stream is
// analog and is not modelled. The shift-register structure and the
// loopback follow the document; the divide-by-20 clocking and the
// sampling phase are this design's. tx_clk and rx_clk are made by a
// flip-flop, as a clock divider is, and drive the lane's parallel logic.
module serdes_lane #(
  parameter int unsigned SER_W = 20
) (
  input  logic             ser_clk,
  input  logic             rst_n,
  input  logic             loopback,
  input  logic [SER_W-1:0] tx_par,
  output logic             tx_clk,
  output logic             ser_tx,
  input  logic             ser_rx,
  output logic [SER_W-1:0] rx_par,
  output logic             rx_clk
);

  localparam int unsigned CW = $clog2(SER_W);
  localparam logic [CW-1:0] LAST = CW'(SER_W - 1);
  localparam logic [CW-1:0] MID  = CW'(SER_W / 2);

  logic [CW-1:0]    cnt_q, cnt_d;
  logic [SER_W-1:0] tx_sh_q, rx_sh_q;
  logic             rx_bit;
  logic             wclk_q;

  assign cnt_d  = (cnt_q == LAST) ? '0 : cnt_q + 1'b1;
  assign rx_bit = loopback ? ser_tx : ser_rx;
  assign ser_tx = tx_sh_q[SER_W-1];
  assign tx_clk = wclk_q;
  assign rx_clk = wclk_q;

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      wclk_q  <= 1'b1;
      tx_sh_q <= '0;
      rx_sh_q <= '0;
      rx_par  <= '0;
    end else begin
      cnt_q   <= cnt_d;
      wclk_q  <= (cnt_d < MID);
      tx_sh_q <= (cnt_q == MID) ? tx_par : {tx_sh_q[SER_W-2:0], 1'b0};
      rx_sh_q <= {rx_sh_q[SER_W-2:0], rx_bit};
      if (cnt_q == MID) rx_par <= {rx_sh_q[SER_W-2:0], rx_bit};
    end
  end

endmodule
