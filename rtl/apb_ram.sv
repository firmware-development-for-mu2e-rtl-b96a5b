// apb_ram: the SRAM capture of one serial lane, read by the processor over
// APB.
//
// It joins the SRAM writer (data_to_sram), a dual-clock SRAM (dc_ram), the
// APB read slave (sram_apb_wrp) and the APB clear slave (sram_refresh).
// Words arriving with WEN on WCLK are stored in pairs until the SRAM is
// full; the processor reads them, then writes the clear register to make
// room for the next capture. The ports are those of one lane's SRAM block
// in the four-lane design: PCLK, reset_n, WCLK, WEN, WD[15:0] and an APB
// slave. Inside the slave's area, PADDR bit AW+2 picks the SRAM words
// (0: offsets 0 .. 4*MEM_WORDS-4) or the clear/status register (1: at
// offset 4*MEM_WORDS, 0x100 for 64 words).
// Sharing one slave for both and the address split are this design's; the
// pieces are the document's.
module apb_ram
  import drac_pkg::*;
#(
  parameter int unsigned MEM_WORDS  = 64,
  parameter int unsigned CLR_CYCLES = 8
) (
  input  logic        PCLK,
  input  logic        reset_n,
  input  apb_req_t    apb_req,
  output apb_rsp_t    apb_rsp,
  input  logic        WCLK,
  input  logic        WEN,
  input  logic [15:0] WD,
  output logic        memory_full
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  logic          w_en, clr_n, wclk_out;
  logic [31:0]   wdata, rdata;
  logic [AW-1:0] waddr, raddr;
  logic          reg_sel;
  apb_req_t      ram_req, reg_req;
  apb_rsp_t      ram_rsp, reg_rsp;
  logic          rd_en_unused, wr_en_unused, rclk, sel_unused;

  assign reg_sel = apb_req.paddr[AW+2];
  always_comb begin
    ram_req      = apb_req;
    reg_req      = apb_req;
    ram_req.psel = apb_req.psel && !reg_sel;
    reg_req.psel = apb_req.psel &&  reg_sel;
    reg_req.paddr = APB_AW'(apb_req.paddr[AW+1:0]);  // offset in the register area
    apb_rsp      = reg_sel ? reg_rsp : ram_rsp;
  end

  data_to_sram #(.MEM_WORDS(MEM_WORDS)) u_writer (
    .clk(WCLK), .en(WEN), .clr_n(clr_n), .data_in(WD),
    .clk_out(wclk_out), .w_en(w_en), .memory_full(memory_full),
    .data_out(wdata), .addr_out(waddr)
  );

  dc_ram #(.DEPTH(MEM_WORDS), .WIDTH(32)) u_ram (
    .WCLK(wclk_out), .WEN(w_en), .WADDR(waddr), .WD(wdata),
    .RCLK(rclk), .RADDR(raddr), .RD(rdata)
  );

  sram_apb_wrp #(.MEM_WORDS(MEM_WORDS)) u_rd (
    .PCLK(PCLK), .PRESETN(reset_n), .apb_req(ram_req), .apb_rsp(ram_rsp),
    .mem_data_out(rdata), .rd_enable(rd_en_unused), .wr_enable(wr_en_unused),
    .rclk(rclk), .SEL(sel_unused), .raddr(raddr)
  );

  sram_refresh #(.CLR_CYCLES(CLR_CYCLES)) u_clr (
    .PCLK(PCLK), .PRESETn(reset_n), .apb_req(reg_req), .apb_rsp(reg_rsp),
    .mem_full(memory_full), .clr_n(clr_n)
  );

endmodule
