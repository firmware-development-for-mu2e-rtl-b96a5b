// dc_ram: simple dual-port SRAM with separate write and read clocks.
//
// Writing runs on the receive clock of the serial lane and reading on the
// APB bus clock, so the two ports have clocks of their own. WEN writes WD
// to WADDR on the rising edge of WCLK. RD is the word at RADDR registered
// on the rising edge of RCLK: one clock of read latency. Reading and
// writing the same address in the same instant returns either word.
// Word width 32 and depth 64 are those of the document's SRAM block; the
// read latency is this design's choice, matching a synchronous block RAM.
module dc_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             WCLK,
  input  logic             WEN,
  input  logic [AW-1:0]    WADDR,
  input  logic [WIDTH-1:0] WD,
  input  logic             RCLK,
  input  logic [AW-1:0]    RADDR,
  output logic [WIDTH-1:0] RD
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge WCLK) begin
    if (WEN) mem[WADDR] <= WD;
  end

  always_ff @(posedge RCLK) begin
    RD <= mem[RADDR];
  end

endmodule
