// tb_adc_fifo: checks the dual-clock FIFO. Write clock 7 ns, read clock
// 10 ns, DEPTH 16.
//   1. Random writes and reads for 3000 read-clock cycles: every word read
//      is the oldest one written (compared with a queue kept here), no
//      word is lost or invented, and empty/full agree with the queue as
//      far as the synchronizer delay allows (never empty with nothing
//      stored is fine, never "not empty" with nothing stored).
//   2. Reads stop and writes go on: full rises with 16 words stored, the
//      next write sets overflow, and exactly the first 16 words come out.
//   3. 20 rounds of reads paused until the FIFO is full, with writes going
//      on, then resumed: every word read must still be one that was
//      accepted, in order; words offered while full are dropped.
module tb_adc_fifo;
  logic        wr_clk = 1'b0, rd_clk = 1'b0, rst_n = 1'b0;
  logic        wr_en = 1'b0, rd_en = 1'b0;
  logic [11:0] wr_data = '0, rd_data;
  logic        full, empty, overflow;
  int checks = 0, failures = 0;

  adc_fifo #(.WIDTH(12), .DEPTH(16)) dut (.wr_clk(wr_clk), .wr_rst_n(rst_n),
    .wr_en(wr_en), .wr_data(wr_data), .full(full), .overflow(overflow),
    .rd_clk(rd_clk), .rd_rst_n(rst_n), .rd_en(rd_en), .rd_data(rd_data), .empty(empty));

  always #3.5 wr_clk = ~wr_clk;
  always #5 rd_clk = ~rd_clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] q[$];
  bit          wr_go = 0, rd_go = 0;
  int          n_read = 0, n_written = 0;

  always @(posedge wr_clk) begin
    if (wr_en && !full) begin
      q.push_back(wr_data);
      n_written++;
    end
  end
  always @(negedge wr_clk) begin
    wr_en   <= wr_go && ($urandom_range(0, 2) == 0);
    wr_data <= 12'($urandom);
  end

  always @(posedge rd_clk) begin
    if (rst_n) begin
      check(!(q.size() == 0 && !empty), "FIFO shows data that was never written");
      if (rd_en && !empty) begin
        logic [11:0] e;
        e = q.size() > 0 ? q.pop_front() : 12'hxxx;
        check(rd_data == e, $sformatf("read %h expected %h", rd_data, e));
        n_read++;
      end
    end
  end
  always @(negedge rd_clk) rd_en <= rd_go && ($urandom_range(0, 3) != 0);

  initial begin
    repeat (3) @(negedge rd_clk);
    rst_n = 1'b1;
    repeat (3) @(negedge rd_clk);
    wr_go = 1; rd_go = 1;
    repeat (3000) @(negedge rd_clk);
    wr_go = 0;
    repeat (50) @(negedge rd_clk);
    check(q.size() == 0 && empty && n_read == n_written && n_read > 1000,
          $sformatf("left %0d, read %0d of %0d", q.size(), n_read, n_written));
    check(!overflow, "overflow without a full FIFO");

    // fill up
    rd_go = 0;
    @(negedge rd_clk);
    wr_go = 1;
    repeat (80) @(negedge rd_clk);
    wr_go = 0;
    check(full && q.size() == 16, $sformatf("full %b with %0d words", full, q.size()));
    check(overflow, "no overflow after writing into a full FIFO");
    rd_go = 1;
    repeat (100) @(negedge rd_clk);
    check(q.size() == 0 && empty, "words left after draining");

    wr_go = 1;
    for (int r = 0; r < 20; r++) begin
      rd_go = 0;
      repeat (70) @(negedge rd_clk);
      check(full, $sformatf("round %0d: not full", r));
      rd_go = 1;
      repeat (30) @(negedge rd_clk);
    end
    wr_go = 0;
    repeat (100) @(negedge rd_clk);
    check(q.size() == 0 && empty, "words left after the rounds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
