// tb_scaling_acc: feeds B random partial products, LSB slice first with s_a
// on the sign slice, and checks the accumulated y against
// -P_0 + sum_j 2^-j P_j computed exactly in 64-bit arithmetic; also checks
// clacc and that lacc low holds the accumulator.
`timescale 1ns/1ps
module tb_scaling_acc;
  localparam int PW = 24, B = 16;
  logic clk = 0, rst_n = 0, lacc = 0, clacc = 0, s_a = 0;
  logic signed [PW-1:0] p_in = '0;
  logic signed [PW:0] y;
  int checks = 0, failures = 0;

  scaling_acc #(.PW(PW), .B(B)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint p [B];
    longint exact, want;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk); clacc = 1; lacc = 1;
      @(negedge clk); clacc = 0;
      check(y == 0, "clacc clears");
      exact = 0;
      for (int j = 0; j < B; j++) begin
        p[j] = longint'($signed(PW'($urandom)));
        if (t < 5) p[j] = (t[0]) ? -(longint'(1) << (PW - 1)) : (longint'(1) << (PW - 1)) - 1;
        exact += (j == 0) ? -p[j] * (longint'(1) << (B - 1)) : p[j] * (longint'(1) << (B - 1 - j));
      end
      want = exact >>> (B - 1);
      for (int j = B - 1; j >= 0; j--) begin
        p_in = PW'(p[j]); s_a = (j == 0); lacc = 1;
        @(negedge clk);
      end
      lacc = 0; s_a = 0;
      check(longint'(y) == want, $sformatf("y=%0d want %0d", y, want));
      @(negedge clk);
      check(longint'(y) == want, "hold with lacc low");
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
