// apb_bfm.svh: APB3 master tasks for testbenches. Included inside a
// module that declares `logic PCLK`, `apb_req_t req` and `apb_rsp_t rsp`.
// Each transfer drives the setup phase after a falling edge of PCLK, the
// access phase one clock later, and waits for PREADY.

task automatic apb_write(input logic [31:0] addr, input logic [31:0] data);
  @(negedge PCLK);
  req.paddr   = addr;
  req.pwrite  = 1'b1;
  req.pwdata  = data;
  req.psel    = 1'b1;
  req.penable = 1'b0;
  @(negedge PCLK);
  req.penable = 1'b1;
  @(posedge PCLK);
  while (!rsp.pready) @(posedge PCLK);
  @(negedge PCLK);
  req.psel    = 1'b0;
  req.penable = 1'b0;
endtask

task automatic apb_read(input logic [31:0] addr, output logic [31:0] data,
                        output logic err);
  @(negedge PCLK);
  req.paddr   = addr;
  req.pwrite  = 1'b0;
  req.psel    = 1'b1;
  req.penable = 1'b0;
  @(negedge PCLK);
  req.penable = 1'b1;
  #0.1;
  while (!rsp.pready) begin
    @(negedge PCLK);
    #0.1;
  end
  data = rsp.prdata;
  err  = rsp.pslverr;
  @(negedge PCLK);
  req.psel    = 1'b0;
  req.penable = 1'b0;
endtask
