// pcs_tx: 8b/10b encoder for the transmit side of one lane.
//
// Each cycle of the lane's parallel clock it takes one 16-bit word and a
// 2-bit control mask (bit i set: byte i is a K symbol) and produces the
// 20-bit encoded word, byte 0 first: tx_code[19:10] is the symbol of
// tx_data[7:0] and is sent first. The running disparity is carried from
// byte 0 to byte 1 and from word to word; it starts negative after reset.
//
// force_disp[i] set encodes byte i at the disparity disp_sel[i]
// (1 = positive) instead of the current one, and the running disparity
// continues from that symbol. invalid_k[i] flags a byte marked as a K
// symbol that is none of the twelve control symbols; such a byte is sent
// as the data symbol of the same value.
//
// Timing: one register stage; tx_code and invalid_k follow tx_data by one
// clock.
// Encoding 16 bits as two symbols with two control bits is how the link's
// encoder is used, and the port names force_disp, disp_sel and invalid_k
// follow that encoder's. What these three do is the usual meaning of such
// ports, not given by the source design. The register stage and byte order
// are this design's.
module pcs_tx
  import code8b10b_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] tx_data,
  input  logic [1:0]  tx_k,
  input  logic [1:0]  force_disp,
  input  logic [1:0]  disp_sel,
  output logic [19:0] tx_code,
  output logic [1:0]  invalid_k
);

  logic     rd_q;
  logic     rd0, rd1;
  enc_res_t e0, e1;

  always_comb begin
    rd0 = force_disp[0] ? disp_sel[0] : rd_q;
    e0  = encode(tx_data[7:0], tx_k[0], rd0);
    rd1 = force_disp[1] ? disp_sel[1] : e0.rd;
    e1  = encode(tx_data[15:8], tx_k[1], rd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q      <= 1'b0;
      tx_code   <= '0;
      invalid_k <= '0;
    end else begin
      rd_q      <= e1.rd;
      tx_code   <= {e0.code, e1.code};
      invalid_k <= {tx_k[1] && !is_valid_k(tx_data[15:8]),
                    tx_k[0] && !is_valid_k(tx_data[7:0])};
    end
  end

endmodule
