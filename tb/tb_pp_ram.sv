// tb_pp_ram: writes random words at random addresses of a small RAM and
// checks every read against a shadow array, including read-modify-write in
// consecutive cycles at one address and that reads do not write.
`timescale 1ns/1ps
module tb_pp_ram;
  localparam int N = 6, PW = 24;
  logic clk = 0, rd_wr = 0;
  logic [N-1:0] addr = '0;
  logic signed [PW-1:0] wdata = '0, rdata;
  logic signed [PW-1:0] shadow [2**N];
  int checks = 0, failures = 0;

  pp_ram #(.N(N), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill
    for (int a = 0; a < 2**N; a++) begin
      @(negedge clk); addr = N'(a); wdata = PW'($urandom); rd_wr = 1; shadow[a] = wdata;
    end
    @(negedge clk); rd_wr = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      addr = N'($urandom);
      #1 check(rdata == shadow[addr], $sformatf("read at %0d", addr));
      if ($urandom_range(0, 1) == 1) begin
        wdata = rdata + 24'sd3;   // read-modify-write
        rd_wr = 1;
        shadow[addr] = wdata;
        @(negedge clk); rd_wr = 0;
        #1 check(rdata == shadow[addr], "read after write");
      end else begin
        wdata = PW'($urandom);    // rd_wr low: must not write
      end
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
