// sram_apb_wrp: APB slave that makes the SRAM readable by the processor.
//
// A read of byte address 4*n in the slave's area returns SRAM word n:
// raddr is taken straight from PADDR during the APB setup phase, the SRAM
// registers the word on the PCLK edge that starts the access phase, and
// PRDATA passes mem_data_out through. The slave never waits (PREADY = 1)
// and never signals an error. Writes are accepted and ignored. rd_enable,
// wr_enable and SEL report the bus activity, rclk is PCLK for the SRAM's
// read port. Translating the slave area into SRAM addresses is the
// document's; the word addressing and zero wait states are this design's.
module sram_apb_wrp
  import drac_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 64,
  localparam int unsigned AW = $clog2(MEM_WORDS)
) (
  input  logic          PCLK,
  input  logic          PRESETN,
  input  apb_req_t      apb_req,
  output apb_rsp_t      apb_rsp,
  input  logic [31:0]   mem_data_out,
  output logic          rd_enable,
  output logic          wr_enable,
  output logic          rclk,
  output logic          SEL,
  output logic [AW-1:0] raddr
);

  logic access_q;  // high during the access phase of a transfer

  assign rclk      = PCLK;
  assign SEL       = apb_req.psel;
  assign raddr     = apb_req.paddr[AW+1:2];
  assign rd_enable = apb_req.psel && !apb_req.pwrite;
  assign wr_enable = apb_req.psel &&  apb_req.pwrite;

  always_ff @(posedge PCLK or negedge PRESETN) begin
    if (!PRESETN) access_q <= 1'b0;
    else          access_q <= apb_req.psel && !apb_req.penable;
  end

  always_comb begin
    apb_rsp         = '0;
    apb_rsp.pready  = 1'b1;
    apb_rsp.prdata  = (apb_req.psel && !apb_req.pwrite) ? mem_data_out : '0;
  end

  // APB rule: the access phase follows a setup phase of the same transfer.
  a_access_after_setup: assert property (@(posedge PCLK) disable iff (!PRESETN)
    (apb_req.psel && apb_req.penable) |-> access_q || $past(apb_req.penable));

endmodule
