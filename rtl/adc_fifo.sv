// adc_fifo: dual-clock FIFO between the digitizer data and the serial
// link.
//
// Samples arrive on wr_clk at a rate set by the particle hits, which is
// neither steady nor tied to the link's word clock; the FIFO absorbs the
// bursts. Classic design: binary read and write pointers one bit wider
// than the address, exchanged between the domains in Gray code through
// two-flop synchronizers. full and empty are therefore pessimistic by the
// synchronizer delay, never wrong. A write while full is dropped and sets
// the sticky overflow flag (cleared by wr_rst_n). Reading is show-ahead:
// rd_data is the oldest word whenever empty is low, and rd_en removes it.
// DEPTH must be a power of two. The need for a FIFO between the two clock
// domains is the document's; its depth, the Gray-code structure and the
// overflow handling are this design's.
module adc_fifo #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin_q, rbin_q, wgray_q, rgray_q;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_d, rbin_d;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_d = wbin_q + 1'b1;
  assign rbin_d = rbin_q + 1'b1;

  // Full: write pointer is one lap ahead of the synchronized read pointer.
  assign full  = (wgray_q == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray_q == wgray_r2);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin_q  <= wbin_d;
        wgray_q <= bin2gray(wbin_d);
      end
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin_q  <= rbin_d;
        rgray_q <= bin2gray(rbin_d);
      end
    end
  end

  assign rd_data = mem[rbin_q[AW-1:0]];

endmodule
