// generator_seq: test-pattern source for one lane.
//
// After reset it sends N_COMMA comma words, K28.5 in byte 0 and D21.5 in
// byte 1 (k_out = 2'b01, data_out = 16'hB5BC), so that the receiver can find the
// word boundary, then N_DATA data words (k_out = 2'b00) in which both
// bytes carry the same 8-bit count: 0000, 0101, 0202, ... The count
// continues from word to word and the comma burst repeats after every
// N_DATA data words. One word per clock, no enable; outputs are
// registered. A counter with a few gates making the control flags is the
// pattern the document uses, and the counting pair of bytes is what its
// simulation shows; the burst length and period are this design's.
module generator_seq
  import drac_pkg::*;
#(
  parameter int unsigned N_COMMA = 16,
  parameter int unsigned N_DATA  = 256
) (
  input  logic        clk,
  input  logic        reset_n,
  output logic [1:0]  k_out,
  output logic [15:0] data_out
);

  logic [7:0]  count_q;
  logic [31:0] pos_q;     // position within one comma burst + data period
  logic        in_burst;

  assign in_burst = pos_q < N_COMMA;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      count_q  <= '0;
      pos_q    <= '0;
      k_out    <= '0;
      data_out <= '0;
    end else begin
      pos_q <= (pos_q == N_COMMA + N_DATA - 1) ? '0 : pos_q + 1;
      if (in_burst) begin
        k_out    <= COMMA_K;
        data_out <= COMMA_WORD;
      end else begin
        k_out    <= 2'b00;
        data_out <= {count_q, count_q};
        count_q  <= count_q + 1'b1;
      end
    end
  end

endmodule
