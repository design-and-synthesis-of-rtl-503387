// tb_pp_update: for every slice index j and random e and P, the new partial
// product must be P + 2^-MU * e * F_j (F_0 = -1, F_j = 2^-j, arithmetic
// shifts rounding down), saturated to PW bits; a second instance checks
// another step constant. Extreme values exercise both saturation limits.
`timescale 1ns/1ps
module tb_pp_update;
  localparam int B = 16, PW = 24;
  localparam int JW = $clog2(B);
  logic signed [PW+1:0] e;
  logic [JW-1:0]        jbit;
  logic signed [PW-1:0] p_old, p_new1, p_new3;
  int checks = 0, failures = 0, n_sat = 0;

  pp_update #(.B(B), .PW(PW), .MU_SHIFT(1)) dut  (.e, .jbit, .p_old, .p_new(p_new1));
  pp_update #(.B(B), .PW(PW), .MU_SHIFT(3)) dut3 (.e, .jbit, .p_old, .p_new(p_new3));

  function automatic longint model(longint ev, int j, longint p, int mu);
    longint delta, s, hi, lo;
    delta = (j == 0) ? -(ev >>> mu) : (ev >>> (j + mu));
    s  = p + delta;
    hi = (longint'(1) << (PW - 1)) - 1;
    lo = -(longint'(1) << (PW - 1));
    return (s > hi) ? hi : (s < lo) ? lo : s;
  endfunction

  task automatic check(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    longint w1;
    for (int t = 0; t < 4000; t++) begin
      e     = (PW+2)'($urandom);
      p_old = PW'($urandom);
      jbit  = JW'(t % B);
      if (t % 7 == 0) e = e >>> 8;  // small errors too
      #1;
      w1 = model(longint'(e), int'(jbit), longint'(p_old), 1);
      if (w1 == (longint'(1) << (PW - 1)) - 1 || w1 == -(longint'(1) << (PW - 1))) n_sat++;
      check(longint'(p_new1), w1, $sformatf("MU=1 j=%0d", jbit));
      check(longint'(p_new3), model(longint'(e), int'(jbit), longint'(p_old), 3),
            $sformatf("MU=3 j=%0d", jbit));
    end
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("saturated results: %0d", n_sat);
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
