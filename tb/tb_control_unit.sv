// tb_control_unit: checks the strobe sequence cycle by cycle against the
// intended schedule: a 2^N-cycle RAM clearing sweep with addresses in order,
// the sc request and, B cycles later, the lr that loads the first sample,
// then sample periods of
// B filter cycles (shift, lacc, slice index B-1..0, sc on the first, s_a on
// the last), one lr cycle, one lbuff_op+clacc cycle and B update cycles
// (shift, re_turn, rd_wr, slice index B-1..0).
`timescale 1ns/1ps
module tb_control_unit;
  import da_lms_pkg::*;
  localparam int N = 4, B = 8, JW = $clog2(B);
  logic clk = 0, rst_n = 0, ready;
  ctrl_t ctrl;
  logic [JW-1:0] jbit;
  logic [N-1:0] init_addr;
  int checks = 0, failures = 0;

  control_unit #(.N(N), .B(B)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_ctrl(ctrl_t want, string what);
    checks++;
    if (ctrl !== want) begin
      failures++;
      if (failures < 10) $display("FAIL: %s: got %b want %b", what, ctrl, want);
    end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    ctrl_t w;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < 2**N; a++) begin
      w = '0; w.init = 1; w.rd_wr = 1; w.clacc = 1;
      expect_ctrl(w, $sformatf("init %0d", a));
      check(init_addr == N'(a), "init address");
      check(!ready, "ready during init");
      @(negedge clk);
    end
    for (int c = 0; c < B; c++) begin
      w = '0; w.sc = (c == 0); expect_ctrl(w, $sformatf("prime %0d", c)); @(negedge clk);
    end
    w = '0; w.lr = 1; expect_ctrl(w, "prime lr"); @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      check(ready, "ready");
      for (int c = 0; c < B; c++) begin
        w = '0; w.shift = 1; w.lacc = 1; w.sc = (c == 0); w.s_a = (c == B - 1);
        expect_ctrl(w, $sformatf("filter %0d/%0d", k, c));
        check(jbit == JW'(B - 1 - c), "filter slice index");
        @(negedge clk);
      end
      w = '0; w.lr = 1; expect_ctrl(w, "latch"); @(negedge clk);
      w = '0; w.lbuff_op = 1; w.clacc = 1; expect_ctrl(w, "output"); @(negedge clk);
      for (int c = 0; c < B; c++) begin
        w = '0; w.shift = 1; w.re_turn = 1; w.rd_wr = 1;
        expect_ctrl(w, $sformatf("update %0d/%0d", k, c));
        check(jbit == JW'(B - 1 - c), "update slice index");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
