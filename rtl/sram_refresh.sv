// sram_refresh: APB slave that empties the SRAM so that it can be filled
// again.
//
// A write to the slave's first location (offset 0, any data) starts a
// clear: clr_n goes low, which resets the address counter and the
// memory_full flag of the SRAM writer. clr_n is held low for at least
// CLR_CYCLES PCLK cycles, long enough for the writer's clock domain to
// see it, and then until memory_full, brought into the PCLK domain by a
// two-flop synchronizer, reads 0, which shows the clear took effect.
// clr_n is also low during PRESETn, so the writer starts empty.
// Reading offset 0 returns {30'b0, clearing, memory_full}. No wait states,
// no errors. The write-to-first-location trigger and the check on
// memory_full follow the document; the minimum pulse length, the
// synchronizer and the status word are this design's.
module sram_refresh
  import drac_pkg::*;
#(
  parameter int unsigned CLR_CYCLES = 8
) (
  input  logic     PCLK,
  input  logic     PRESETn,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  input  logic     mem_full,
  output logic     clr_n
);

  localparam int unsigned CW = $clog2(CLR_CYCLES + 1);

  logic [1:0]    full_sync_q;
  logic          clearing_q;
  logic [CW-1:0] hold_q;
  logic          start;

  assign start = apb_req.psel && apb_req.penable && apb_req.pwrite &&
                 (apb_req.paddr[7:2] == '0);
  assign clr_n = !clearing_q;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      full_sync_q <= '0;
      clearing_q  <= 1'b1;
      hold_q      <= CW'(CLR_CYCLES);
    end else begin
      full_sync_q <= {full_sync_q[0], mem_full};
      if (start) begin
        clearing_q <= 1'b1;
        hold_q     <= CW'(CLR_CYCLES);
      end else if (clearing_q) begin
        if (hold_q != 0)          hold_q     <= hold_q - 1'b1;
        else if (!full_sync_q[1]) clearing_q <= 1'b0;
      end
    end
  end

  always_comb begin
    apb_rsp        = '0;
    apb_rsp.pready = 1'b1;
    if (apb_req.psel && !apb_req.pwrite && apb_req.paddr[7:2] == '0)
      apb_rsp.prdata = {30'b0, clearing_q, full_sync_q[1]};
  end

endmodule
