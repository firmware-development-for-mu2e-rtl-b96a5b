// pcs_rx: comma word aligner and 8b/10b decoder for the receive side of
// one lane.
//
// The deserializer delivers 20 raw bits per parallel clock with no regard
// for symbol boundaries (first received bit in rx_raw[19]). The aligner
// looks at the last two raw words as a 40-bit window and, for each of the
// 20 possible offsets, checks whether a 20-bit word starting there opens
// with a comma (0011111 or 1100000). While unaligned it counts commas seen
// in consecutive words at the same offset; after ALIGN_COMMAS of them it
// locks that offset and raises `aligned`. The link only comes up if the
// transmitter sends at least that many commas in a row. The lock holds
// until wa_rst_n (word-aligner reset) or rst_n.
//
// Once aligned, each word is decoded into two bytes (byte 0 from the first
// symbol), a K flag per byte, a code-error flag per byte (not a valid
// symbol) and a disparity-error flag per byte. rx_valid marks decoded
// words. Running disparity is taken from the commas seen while aligning.
// Timing: the word at the locked offset is decoded and registered, so
// outputs follow the raw word that completes it by one clock.
// The need for a run of commas is the link's behaviour; the window search,
// the lock rule and ALIGN_COMMAS are this design's.
module pcs_rx
  import code8b10b_pkg::*;
  import drac_pkg::*;
#(
  parameter int unsigned ALIGN_COMMAS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wa_rst_n,
  input  logic [19:0] rx_raw,
  output logic        aligned,
  output logic        rx_valid,
  output logic [15:0] rx_data,
  output logic [1:0]  rx_k,
  output logic [1:0]  code_err,
  output logic [1:0]  disp_err
);

  logic [19:0] prev_q;
  logic [39:0] win;
  logic [4:0]  off_q;      // locked or candidate offset
  logic [$clog2(ALIGN_COMMAS+1)-1:0] cnt_q;
  logic        rd_q;

  logic        found;
  logic [4:0]  found_off;
  logic [19:0] cand;
  logic [19:0] word_at_lock;
  dec_res_t    d0, d1, c0, c1;

  assign win = {prev_q, rx_raw};

  // Lowest offset whose 20-bit word starts with a comma.
  always_comb begin
    found     = 1'b0;
    found_off = '0;
    for (int o = 19; o >= 0; o--) begin
      if (win[39-o -: 7] == COMMA_POS || win[39-o -: 7] == COMMA_NEG) begin
        found     = 1'b1;
        found_off = 5'(o);
      end
    end
  end

  always_comb begin
    cand         = win[39-found_off -: 20];
    word_at_lock = win[39-off_q -: 20];
    // Decoding the comma sets the disparity the data that follows expects.
    c0 = decode(cand[19:10], cand[19:14] == 6'b110000);
    c1 = decode(cand[9:0], c0.rd);
    d0 = decode(word_at_lock[19:10], rd_q);
    d1 = decode(word_at_lock[9:0], d0.rd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q   <= '0;
      off_q    <= '0;
      cnt_q    <= '0;
      rd_q     <= 1'b0;
      aligned  <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      rx_k     <= '0;
      code_err <= '0;
      disp_err <= '0;
    end else begin
      prev_q <= rx_raw;
      if (!wa_rst_n) begin
        aligned  <= 1'b0;
        cnt_q    <= '0;
        rx_valid <= 1'b0;
      end else if (!aligned) begin
        rx_valid <= 1'b0;
        if (found) begin
          off_q <= found_off;
          rd_q  <= c1.rd;
          if (cnt_q != 0 && found_off == off_q) begin
            cnt_q <= cnt_q + 1'b1;
            if (32'(cnt_q) + 1 >= ALIGN_COMMAS) aligned <= 1'b1;
          end else begin
            cnt_q <= 1;
            if (ALIGN_COMMAS <= 1) aligned <= 1'b1;
          end
        end else begin
          cnt_q <= '0;
        end
      end else begin
        rd_q     <= d1.rd;
        rx_valid <= 1'b1;
        rx_data  <= {d1.data, d0.data};
        rx_k     <= {d1.k, d0.k};
        code_err <= {d1.code_err, d0.code_err};
        disp_err <= {d1.disp_err, d0.disp_err};
      end
    end
  end

endmodule
