// tb_siso: chains two SISO registers behind a serial source. B cycles of
// plain shifting must move a word one register down the chain (the second
// register then presents, LSB first, what the first held); B cycles with
// re_turn must present a register's word LSB first and leave it unchanged.
`timescale 1ns/1ps
module tb_siso;
  localparam int B = 16;
  logic clk = 0, rst_n = 0, shift = 0, re_turn = 0, sin = 0;
  logic s1, s2;
  int checks = 0, failures = 0;

  siso #(.B(B)) dut  (.clk, .rst_n, .shift, .re_turn, .sin,      .sout(s1));
  siso #(.B(B)) dut2 (.clk, .rst_n, .shift, .re_turn, .sin(s1),  .sout(s2));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [B-1:0] w1, w0, got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    w0 = '0;
    for (int t = 0; t < 20; t++) begin
      w1 = B'($urandom);
      // shift w1 into the first register, w0 moves into the second
      for (int i = 0; i < B; i++) begin
        @(negedge clk); sin = w1[i]; shift = 1; re_turn = 0;
      end
      @(negedge clk); shift = 0;
      // recirculate both twice and read them out
      for (int r = 0; r < 2; r++) begin
        for (int i = 0; i < B; i++) begin
          check(s1 == w1[i], $sformatf("round %0d first reg bit %0d", t, i));
          check(s2 == w0[i], $sformatf("round %0d second reg bit %0d", t, i));
          shift = 1; re_turn = 1; sin = 1'($urandom); @(negedge clk);
        end
        shift = 0; re_turn = 0;
        @(negedge clk);
      end
      w0 = w1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
