// tb_data_to_sram: checks the SRAM writer against a model written here.
//
// Words arrive with random gaps in en. Every SRAM write (w_en) must carry
// the next pair, first word in the low half, at the next address, starting
// at 0. memory_full must rise with the write to the last address and no
// write may follow until clr_n; words sent while full are lost. After a
// clear the addresses start again at 0. MEM_WORDS is 8 here.
module tb_data_to_sram;
  localparam int unsigned MW = 8;
  logic        clk = 1'b0, en = 1'b0, clr_n = 1'b0;
  logic [15:0] data_in = '0;
  logic        clk_out, w_en, memory_full;
  logic [31:0] data_out;
  logic [2:0]  addr_out;
  int checks = 0, failures = 0;

  data_to_sram #(.MEM_WORDS(MW)) dut (.clk(clk), .en(en), .clr_n(clr_n),
    .data_in(data_in), .clk_out(clk_out), .w_en(w_en), .memory_full(memory_full),
    .data_out(data_out), .addr_out(addr_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] words[$];
  int          next_addr = 0, writes = 0;
  bit          model_full = 0;

  always @(posedge clk) begin
    #1;
    if (w_en) begin
      logic [15:0] lo, hi;
      writes++;
      check(!model_full, "write after memory full");
      check(words.size() >= 2, "write without two words");
      if (words.size() >= 2) begin
        lo = words.pop_front();
        hi = words.pop_front();
        check(data_out == {hi, lo} && 32'(addr_out) == next_addr,
              $sformatf("write %h @%0d expected %h @%0d", data_out, addr_out, {hi, lo}, next_addr));
      end
      check(memory_full == (next_addr == MW - 1), $sformatf("memory_full %b at address %0d", memory_full, next_addr));
      if (next_addr == MW - 1) model_full = 1;
      next_addr++;
    end
  end

  task automatic push_words(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      en = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      en      = 1'b1;
      data_in = 16'($urandom);
      if (!model_full) words.push_back(data_in);
    end
    @(negedge clk);
    en = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    clr_n = 1'b1;
    repeat (3) @(negedge clk);
    push_words(2 * MW + 6);
    check(writes == MW && memory_full, $sformatf("%0d writes, full %b", writes, memory_full));
    // clear and fill again
    @(negedge clk);
    clr_n = 1'b0;
    @(negedge clk);
    check(!memory_full, "memory_full not cleared");
    clr_n = 1'b1;
    words.delete();
    model_full = 0;
    next_addr  = 0;
    writes     = 0;
    repeat (3) @(negedge clk);
    push_words(7);    // three pairs and one half
    check(writes == 3 && !memory_full, $sformatf("after clear: %0d writes", writes));
    push_words(2 * MW);
    check(writes == MW && memory_full, $sformatf("second fill: %0d writes", writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
