// tb_generator_seq: checks the test pattern word by word against a model
// written here: N_COMMA comma words {D21.5, K28.5} (k = 01), then N_DATA
// words {c, c} with k = 00 and c counting on from word to word, repeated.
// Three full periods are checked, starting with the first clock after
// reset.
module tb_generator_seq;
  localparam int unsigned NC = 5, ND = 20;
  logic        clk = 1'b0, reset_n = 1'b0;
  logic [1:0]  k_out;
  logic [15:0] data_out;
  int checks = 0, failures = 0;

  generator_seq #(.N_COMMA(NC), .N_DATA(ND)) dut (
    .clk(clk), .reset_n(reset_n), .k_out(k_out), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  c;
    logic [15:0] ed;
    logic [1:0]  ek;
    c = 0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    for (int p = 0; p < 3; p++) begin
      for (int i = 0; i < NC + ND; i++) begin
        @(posedge clk);
        #1;
        if (i < NC) begin
          ed = 16'hB5BC;
          ek = 2'b01;
        end else begin
          ed = {c, c};
          ek = 2'b00;
          c++;
        end
        checks++;
        if (data_out !== ed || k_out !== ek) begin
          failures++;
          $display("FAIL: period %0d word %0d: %h/%b expected %h/%b", p, i, data_out, k_out, ed, ek);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
