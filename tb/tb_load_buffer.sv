// tb_load_buffer: random load strobes and data; the buffer must take d only
// on a load and hold its value otherwise; reset gives zero.
`timescale 1ns/1ps
module tb_load_buffer;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] d = '0, q, want;
  int checks = 0, failures = 0;

  load_buffer #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check(q == '0, "reset value");
    rst_n = 1;
    want = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      d = W'($urandom);
      load = ($urandom_range(0, 2) == 0);
      if (load) want = d;
      @(negedge clk);
      load = 0;
      check(q == want, $sformatf("step %0d: q=%h want %h", t, q, want));
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
