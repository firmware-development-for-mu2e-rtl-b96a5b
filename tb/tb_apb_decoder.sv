// tb_apb_decoder: checks the address decoder with four slave models
// written here. Slave i answers a read with {i, paddr[15:0]} and takes a
// number of wait states equal to i. For random addresses in the four
// 1 KiB windows, exactly the addressed slave must see PSEL, the master
// must get that slave's data after its wait states, and PSLVERR must be
// low. Addresses past the last window must complete with PSLVERR and
// select no slave.
module tb_apb_decoder;
  import drac_pkg::*;
  localparam int unsigned N = 4;
  logic     PCLK = 1'b0, PRESETn = 1'b0;
  apb_req_t req = '0;
  apb_rsp_t rsp;
  apb_req_t s_req [N];
  apb_rsp_t s_rsp [N];
  int       wait_cnt [N];
  int checks = 0, failures = 0;

  apb_decoder #(.N_SLAVES(N), .SLOT_LSB(10)) dut (.PCLK(PCLK), .PRESETn(PRESETn),
    .m_req(req), .m_rsp(rsp), .s_req(s_req), .s_rsp(s_rsp));

  `include "apb_bfm.svh"

  always #5 PCLK = ~PCLK;

  for (genvar i = 0; i < N; i++) begin : g_slave
    always @(posedge PCLK) begin
      if (s_req[i].psel && s_req[i].penable) wait_cnt[i] <= wait_cnt[i] + 1;
      else wait_cnt[i] <= 0;
    end
    always_comb begin
      s_rsp[i].prdata  = {16'(i), s_req[i].paddr[15:0]};
      s_rsp[i].pready  = wait_cnt[i] >= i;
      s_rsp[i].pslverr = 1'b0;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // At most the addressed slave is selected during any transfer.
  int    target = -1;
  always @(posedge PCLK) begin
    if (req.psel) begin
      for (int i = 0; i < N; i++)
        check(s_req[i].psel == (i == target), $sformatf("slave %0d psel %b, target %0d", i, s_req[i].psel, target));
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, a;
    logic        e;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    repeat (2) @(negedge PCLK);
    PRESETn = 1'b1;
    for (int k = 0; k < 100; k++) begin
      int s;
      s = $urandom_range(0, N - 1);
      a = (32'(s) << 10) | 32'($urandom_range(0, 255) << 2);
      target = s;
      apb_read(a, d, e);
      check(d == {16'(s), a[15:0]} && !e, $sformatf("read %h gave %h err %b", a, d, e));
    end
    for (int k = 0; k < 10; k++) begin
      a = 32'(N) << 10 | 32'($urandom_range(0, 1 << 20) << 2);
      target = -1;
      apb_read(a, d, e);
      check(e, $sformatf("address %h gave no error", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
