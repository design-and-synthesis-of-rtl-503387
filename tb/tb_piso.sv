// tb_piso: loads random words into the PISO and checks that the serial
// output gives their bits LSB first, one per shift cycle, that a cycle
// without shift holds the bit, and that zeros follow the last bit.
`timescale 1ns/1ps
module tb_piso;
  localparam int B = 16;
  logic clk = 0, rst_n = 0, lr = 0, shift = 0, sout;
  logic [B-1:0] din = '0;
  int checks = 0, failures = 0;

  piso #(.B(B)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [B-1:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sout == 1'b0, "reset value");
    for (int t = 0; t < 20; t++) begin
      w = B'($urandom);
      @(negedge clk); din = w; lr = 1;
      @(negedge clk); lr = 0;
      for (int i = 0; i < B; i++) begin
        check(sout == w[i], $sformatf("word %0d bit %0d", t, i));
        if (i == 3) begin   // a hold cycle
          @(negedge clk);
          check(sout == w[i], "hold without shift");
        end
        shift = 1; @(negedge clk); shift = 0;
      end
      check(sout == 1'b0, "zero after last bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
