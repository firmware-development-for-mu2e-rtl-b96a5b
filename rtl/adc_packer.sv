// adc_packer: turns 12-bit digitizer samples into the 16-bit words the
// encoder takes.
//
// It reads the show-ahead FIFO in front of it and gives one word per
// clock. Two ways of filling the 16 bits are built, chosen by PACK_MODE:
//   0  one sample per word, the top 4 bits carrying a control field: a
//      sample sequence number modulo 16, so that lost words can be seen;
//      word = {seq[3:0], sample[11:0]}.
//   1  samples packed end to end with no padding, the first sample in the
//      lowest bits: four samples make three words,
//      w0 = {s1[3:0], s0}, w1 = {s2[7:0], s1[11:4]}, w2 = {s3, s2[11:8]}.
// When no full word is ready it sends the idle word {D21.5, K28.5}
// (k = 2'b01), which also keeps the receiver's word alignment fed.
// Outputs are registered: one clock from FIFO read to word.
// The two filling options are the document's; the sequence number, the
// bit order and the idle commas are this design's.
module adc_packer
  import drac_pkg::*;
#(
  parameter int unsigned PACK_MODE = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fifo_empty,
  input  logic [11:0] fifo_data,
  output logic        fifo_rd,
  output logic [15:0] data_out,
  output logic [1:0]  k_out
);

  logic [27:0] acc_q, acc_d;   // PACK_MODE 1 bit buffer, oldest bit at 0
  logic [4:0]  cnt_q, cnt_d;   // valid bits in acc_q
  logic [3:0]  seq_q;
  logic        emit;
  logic [15:0] word;

  always_comb begin
    acc_d   = acc_q;
    cnt_d   = cnt_q;
    fifo_rd = 1'b0;
    emit    = 1'b0;
    word    = COMMA_WORD;
    if (PACK_MODE == 0) begin
      if (!fifo_empty) begin
        fifo_rd = 1'b1;
        emit    = 1'b1;
        word    = {seq_q, fifo_data};
      end
    end else begin
      if (cnt_q >= 5'd16) begin
        emit  = 1'b1;
        word  = acc_q[15:0];
        acc_d = acc_q >> 16;
        cnt_d = cnt_q - 5'd16;
      end
      if (!fifo_empty && cnt_d <= 5'd16) begin
        fifo_rd = 1'b1;
        acc_d   = acc_d | (28'(fifo_data) << cnt_d);
        cnt_d   = cnt_d + 5'd12;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      cnt_q    <= '0;
      seq_q    <= '0;
      data_out <= COMMA_WORD;
      k_out    <= COMMA_K;
    end else begin
      acc_q    <= acc_d;
      cnt_q    <= cnt_d;
      data_out <= word;
      k_out    <= emit ? 2'b00 : COMMA_K;
      if (emit) seq_q <= seq_q + 1'b1;
    end
  end

endmodule
