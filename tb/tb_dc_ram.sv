// tb_dc_ram: checks the dual-clock SRAM. The write clock has a 10 ns and
// the read clock a 14 ns period. All 64 words are written with random
// data, then read back in random order: the word must appear on RD one
// read-clock edge after the address. A second pass overwrites half the
// words and checks that the others kept their values.
module tb_dc_ram;
  logic        wclk = 1'b0, rclk = 1'b0, wen = 1'b0;
  logic [5:0]  waddr = '0, raddr = '0;
  logic [31:0] wd = '0, rd;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  dc_ram dut (.WCLK(wclk), .WEN(wen), .WADDR(waddr), .WD(wd),
              .RCLK(rclk), .RADDR(raddr), .RD(rd));

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge wclk);
    wen = 1'b1; waddr = 6'(a); wd = d;
    @(negedge wclk);
    wen = 1'b0;
    model[a] = d;
  endtask

  task automatic rd_check(input int a);
    @(negedge rclk);
    raddr = 6'(a);
    @(posedge rclk);
    #1;
    checks++;
    if (rd !== model[a]) begin
      failures++;
      $display("FAIL: word %0d = %h expected %h", a, rd, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) wr(a, $urandom);
    for (int i = 0; i < 128; i++) rd_check($urandom_range(0, 63));
    for (int a = 0; a < 64; a += 2) wr(a, $urandom);
    for (int a = 0; a < 64; a++) rd_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
