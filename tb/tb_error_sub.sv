// tb_error_sub: random and extreme d and y; e must equal d aligned to y's
// binary point minus y, computed in 64-bit arithmetic.
`timescale 1ns/1ps
module tb_error_sub;
  localparam int DW = 16, PW = 24, PFRAC = 20;
  logic signed [DW-1:0] d;
  logic signed [PW:0]   y;
  logic signed [PW+1:0] e;
  int checks = 0, failures = 0;

  error_sub #(.DW(DW), .PW(PW), .PFRAC(PFRAC)) dut (.*);

  initial begin
    longint want;
    for (int t = 0; t < 1000; t++) begin
      d = DW'($urandom);
      y = (PW+1)'($urandom);
      if (t == 0) begin d = {1'b1, {(DW-1){1'b0}}}; y = {1'b0, {PW{1'b1}}}; end
      if (t == 1) begin d = {1'b0, {(DW-1){1'b1}}}; y = {1'b1, {PW{1'b0}}}; end
      #1;
      want = longint'(d) * (longint'(1) << (PFRAC - DW + 1)) - longint'(y);
      checks++;
      if (longint'(e) != want) begin
        failures++;
        $display("FAIL: d=%0d y=%0d e=%0d want %0d", d, y, e, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
