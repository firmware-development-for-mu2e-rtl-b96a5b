// apb_decoder: APB3 bus decoder from one master to N_SLAVES slaves.
//
// The slave number is PADDR[SLOT_LSB +: SEL_W]: each slave owns an
// aligned window of 2**SLOT_LSB bytes, slave 0 at address 0. PSEL goes to
// the addressed slave only; the other request fields go to all. The
// selected slave's response is returned; an address beyond the last slave
// completes at once with PSLVERR. Purely combinational. The document uses
// a vendor bus block for this; the window layout is this design's.
module apb_decoder
  import drac_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned SLOT_LSB = 10
) (
  input  logic     PCLK,
  input  logic     PRESETn,
  input  apb_req_t m_req,
  output apb_rsp_t m_rsp,
  output apb_req_t s_req [N_SLAVES],
  input  apb_rsp_t s_rsp [N_SLAVES]
);

  localparam int unsigned SEL_W = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  logic [SEL_W-1:0] idx;
  logic             hit;

  assign idx = m_req.paddr[SLOT_LSB +: SEL_W];
  assign hit = (32'(idx) < N_SLAVES) &&
               (m_req.paddr >> (SLOT_LSB + SEL_W)) == '0;

  always_comb begin
    m_rsp = '0;
    for (int i = 0; i < N_SLAVES; i++) begin
      s_req[i]      = m_req;
      s_req[i].psel = m_req.psel && hit && (32'(idx) == i);
      if (hit && 32'(idx) == i) m_rsp = s_rsp[i];
    end
    if (!hit) begin
      m_rsp.pready  = 1'b1;
      m_rsp.pslverr = m_req.psel;
    end
  end

  // APB rules checked at the master port.
  a_enable_needs_sel: assert property (@(posedge PCLK) disable iff (!PRESETn)
    m_req.penable |-> m_req.psel);
  a_stable_in_access: assert property (@(posedge PCLK) disable iff (!PRESETn)
    (m_req.psel && m_req.penable) |-> ($stable(m_req.paddr) && $stable(m_req.pwrite)));

endmodule
