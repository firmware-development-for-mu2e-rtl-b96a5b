// tb_adc_packer: checks both ways of filling 16-bit words with 12-bit
// samples. Two packers (PACK_MODE 0 and 1) read their own copy of the same
// sample stream from show-ahead FIFO models written here, fed in bursts
// with gaps. The words that come out are unpacked here:
//   mode 0: each data word is {seq, sample}, seq counting 0, 1, ... mod 16;
//   mode 1: data words are concatenated, first word lowest, and cut into
//           12-bit samples.
// Both must give back exactly the samples fed in, in order. Words with
// k = 01 must be the idle word 16'hB5BC, and idle words must appear while
// the FIFO is empty. Mode 1 must need 3 data words per 4 samples.
module tb_adc_packer;
  localparam int unsigned NS = 400;   // samples, a multiple of 4
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        empty0, empty1, rd0, rd1;
  logic [11:0] fd0, fd1;
  logic [15:0] d0, d1;
  logic [1:0]  k0, k1;
  int checks = 0, failures = 0;

  adc_packer #(.PACK_MODE(0)) dut0 (.clk(clk), .rst_n(rst_n), .fifo_empty(empty0),
    .fifo_data(fd0), .fifo_rd(rd0), .data_out(d0), .k_out(k0));
  adc_packer #(.PACK_MODE(1)) dut1 (.clk(clk), .rst_n(rst_n), .fifo_empty(empty1),
    .fifo_data(fd1), .fifo_rd(rd1), .data_out(d1), .k_out(k1));

  always #5 clk = ~clk;

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

  logic [11:0] src[$], q0[$], q1[$], out0[$], out1[$];
  logic [4:0]  seq = 0;
  logic [63:0] bits = 0;
  int          nbits = 0, words1 = 0, idle0 = 0, idle1 = 0;

  // FIFO models: show-ahead, popped on a read strobe at the clock edge.
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd0 && q0.size() > 0) void'(q0.pop_front());
      if (rd1 && q1.size() > 0) void'(q1.pop_front());
    end
  end
  always @(negedge clk) begin
    empty0 = q0.size() == 0;
    empty1 = q1.size() == 0;
    fd0    = empty0 ? 12'h0 : q0[0];
    fd1    = empty1 ? 12'h0 : q1[0];
  end

  // Unpack what comes out.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (k0 == 2'b00) begin
        check(d0[15:12] == seq[3:0], $sformatf("mode 0 sequence %h expected %h", d0[15:12], seq[3:0]));
        seq = seq + 1;
        out0.push_back(d0[11:0]);
      end else begin
        check(k0 == 2'b01 && d0 == 16'hB5BC, $sformatf("mode 0 idle word %h/%b", d0, k0));
        idle0++;
      end
      if (k1 == 2'b00) begin
        bits[nbits +: 16] = d1;
        nbits += 16;
        words1++;
        while (nbits >= 12) begin
          out1.push_back(bits[11:0]);
          bits  = bits >> 12;
          nbits -= 12;
        end
      end else begin
        check(k1 == 2'b01 && d1 == 16'hB5BC, $sformatf("mode 1 idle word %h/%b", d1, k1));
        idle1++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < NS; ) begin
      int burst;
      burst = $urandom_range(1, 12);
      for (int i = 0; i < burst && n < NS; i++, n++) begin
        logic [11:0] s;
        s = 12'($urandom);
        src.push_back(s);
        q0.push_back(s);
        q1.push_back(s);
      end
      repeat ($urandom_range(0, 15)) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(out0.size() == NS && out1.size() == NS,
          $sformatf("samples out: mode 0 %0d, mode 1 %0d of %0d", out0.size(), out1.size(), NS));
    for (int i = 0; i < NS && i < out0.size() && i < out1.size(); i++) begin
      check(out0[i] == src[i], $sformatf("mode 0 sample %0d = %h expected %h", i, out0[i], src[i]));
      check(out1[i] == src[i], $sformatf("mode 1 sample %0d = %h expected %h", i, out1[i], src[i]));
    end
    check(words1 == NS * 3 / 4, $sformatf("mode 1 used %0d words for %0d samples", words1, NS));
    check(idle0 > 0 && idle1 > 0, "no idle words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
