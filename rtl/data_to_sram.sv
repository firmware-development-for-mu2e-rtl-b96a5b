// data_to_sram: writes received 16-bit words into the 32-bit SRAM.
//
// Every clock with en high brings one 16-bit word. The first word of a
// pair is held; when the second arrives the pair is written as one 32-bit
// word, the first word in bits 15:0, at the address given by a binary
// counter, which then advances. The SRAM size is a parameter (MEM_WORDS),
// so the block knows its last address: memory_full rises with the write to
// that address and further words are dropped until a clear.
// clr_n (active low, from the APB clock domain) clears the counter, the
// held half and memory_full; it acts at once and is released through a
// two-flop synchronizer, so it also serves as this block's reset.
// Timing: w_en, data_out and addr_out are registered and form one write
// cycle for the SRAM clocked by the same clk (clk_out). Waiting for two
// words, the counter address and memory_full follow the document; the
// half order, the drop-when-full rule and the synchronizer are this
// design's.
module data_to_sram #(
  parameter int unsigned MEM_WORDS = 64,
  localparam int unsigned AW = $clog2(MEM_WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          clr_n,
  input  logic [15:0]   data_in,
  output logic          clk_out,
  output logic          w_en,
  output logic          memory_full,
  output logic [31:0]   data_out,
  output logic [AW-1:0] addr_out
);

  localparam logic [AW-1:0] LAST = AW'(MEM_WORDS - 1);

  logic [1:0]    clr_sync_q;
  logic          run;
  logic          half_q;
  logic [15:0]   low_q;
  logic [AW-1:0] addr_q;

  assign clk_out = clk;
  assign run     = clr_sync_q[1];

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) clr_sync_q <= '0;
    else        clr_sync_q <= {clr_sync_q[0], 1'b1};
  end

  always_ff @(posedge clk or negedge run) begin
    if (!run) begin
      half_q      <= 1'b0;
      low_q       <= '0;
      addr_q      <= '0;
      w_en        <= 1'b0;
      memory_full <= 1'b0;
      data_out    <= '0;
      addr_out    <= '0;
    end else begin
      w_en <= 1'b0;
      if (en && !memory_full) begin
        if (!half_q) begin
          low_q  <= data_in;
          half_q <= 1'b1;
        end else begin
          half_q   <= 1'b0;
          w_en     <= 1'b1;
          data_out <= {data_in, low_q};
          addr_out <= addr_q;
          if (addr_q == LAST) memory_full <= 1'b1;
          else                addr_q      <= addr_q + 1'b1;
        end
      end
    end
  end

endmodule
