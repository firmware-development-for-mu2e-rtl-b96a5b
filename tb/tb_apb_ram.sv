// tb_apb_ram: one lane's capture from write port to APB, end to end.
// WCLK (8 ns) and PCLK (10 ns) are unrelated. MEM_WORDS is 16 here.
//   1. After reset the memory is empty (status 0).
//   2. 2*MEM_WORDS + 10 random words are written with random gaps; the
//      memory must report full, and every SRAM word read over APB must be
//      the pair {word 2n+1, word 2n}; the extra words are dropped.
//   3. Writing the clear register empties it; a second, shorter capture
//      lands from address 0 and is read back correctly.
module tb_apb_ram;
  import drac_pkg::*;
  localparam int unsigned MW = 16;
  localparam logic [31:0] REG = 32'(4 * MW);  // clear/status register
  logic        PCLK = 1'b0, reset_n = 1'b0, WCLK = 1'b0, WEN = 1'b0;
  logic [15:0] WD = '0;
  logic        memory_full;
  apb_req_t    req = '0;
  apb_rsp_t    rsp;
  int checks = 0, failures = 0;

  apb_ram #(.MEM_WORDS(MW)) dut (.PCLK(PCLK), .reset_n(reset_n), .apb_req(req),
    .apb_rsp(rsp), .WCLK(WCLK), .WEN(WEN), .WD(WD), .memory_full(memory_full));

  `include "apb_bfm.svh"

  always #5 PCLK = ~PCLK;
  always #4 WCLK = ~WCLK;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] sent[$];

  task automatic capture(input int n);
    sent.delete();
    for (int i = 0; i < n; i++) begin
      @(negedge WCLK);
      WEN = 1'b0;
      repeat ($urandom_range(0, 1)) @(negedge WCLK);
      WEN = 1'b1;
      WD  = 16'($urandom);
      sent.push_back(WD);
    end
    @(negedge WCLK);
    WEN = 1'b0;
    repeat (4) @(negedge WCLK);
  endtask

  task automatic read_back(input int pairs);
    logic [31:0] d;
    logic        e;
    for (int a = 0; a < pairs; a++) begin
      apb_read(32'(a) << 2, d, e);
      check(d == {sent[2*a+1], sent[2*a]} && !e,
            $sformatf("word %0d = %h expected %h", a, d, {sent[2*a+1], sent[2*a]}));
    end
  endtask

  initial begin
    logic [31:0] d;
    logic        e;
    repeat (3) @(negedge PCLK);
    reset_n = 1'b1;
    repeat (20) @(negedge PCLK);
    apb_read(REG, d, e);
    check(d == 32'h0, $sformatf("status after reset %h", d));

    capture(2 * MW + 10);
    check(memory_full, "memory not full");
    repeat (5) @(negedge PCLK);
    apb_read(REG, d, e);
    check(d == 32'h1, $sformatf("status when full %h", d));
    read_back(MW);

    apb_write(REG, 32'h0);
    repeat (30) @(negedge PCLK);
    check(!memory_full, "memory still full after clear");
    apb_read(REG, d, e);
    check(d == 32'h0, $sformatf("status after clear %h", d));
    capture(12);
    check(!memory_full, "memory full after 6 words");
    read_back(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
