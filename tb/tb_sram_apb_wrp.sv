// tb_sram_apb_wrp: checks the APB read slave with an SRAM model written
// here (registered read on PCLK, as the real SRAM). Every word of a
// 64-word random memory is read over APB in random order and must match;
// raddr must be PADDR[7:2] during each transfer; PREADY is always high and
// PSLVERR low; a write leaves the memory alone and the bus free; SEL,
// rd_enable and wr_enable follow the transfer.
module tb_sram_apb_wrp;
  import drac_pkg::*;
  logic     PCLK = 1'b0, PRESETN = 1'b0;
  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic [31:0] mem_data_out;
  logic        rd_enable, wr_enable, rclk, SEL;
  logic [5:0]  raddr;
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  int rd_seen = 0, wr_seen = 0;

  sram_apb_wrp dut (.PCLK(PCLK), .PRESETN(PRESETN), .apb_req(req), .apb_rsp(rsp),
    .mem_data_out(mem_data_out), .rd_enable(rd_enable), .wr_enable(wr_enable),
    .rclk(rclk), .SEL(SEL), .raddr(raddr));

  `include "apb_bfm.svh"

  always #5 PCLK = ~PCLK;
  always @(posedge rclk) mem_data_out <= model[raddr];
  always @(posedge PCLK) begin
    if (SEL && rd_enable) rd_seen++;
    if (SEL && wr_enable) wr_seen++;
    if (req.psel) begin
      checks++;
      if (raddr !== req.paddr[7:2] || SEL !== 1'b1) begin
        failures++;
        $display("FAIL: raddr %0d for paddr %h", raddr, req.paddr);
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic        e;
    for (int i = 0; i < 64; i++) model[i] = $urandom;
    repeat (2) @(negedge PCLK);
    PRESETN = 1'b1;
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(0, 63);
      apb_read(32'(a) << 2, d, e);
      checks++;
      if (d !== model[a] || e !== 1'b0) begin
        failures++;
        $display("FAIL: read word %0d = %h expected %h err %b", a, d, model[a], e);
      end
    end
    apb_write(32'h10, 32'hDEAD_BEEF);
    apb_read(32'h10, d, e);
    checks++;
    if (d !== model[4]) begin
      failures++;
      $display("FAIL: write changed the memory");
    end
    checks++;
    if (rd_seen < 400 || wr_seen < 2) begin
      failures++;
      $display("FAIL: rd_enable %0d, wr_enable %0d cycles", rd_seen, wr_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
