// tb_da_lms_filter: end-to-end test of the DA LMS adaptive filter at reduced
// size (4 taps, 8-bit samples).
//
// An A/D model answers every sc request with the next input sample s(n) and
// the desired response d(n-1) for the sample just filtered. The input is
// white noise; the desired response is a fixed 4-tap FIR of the input plus a
// little noise (system identification). Every y(k) and e(k) the filter
// presents is compared with a bit-exact reference model, the sample period
// (2B+2 cycles) is checked, and the run counts the mechanisms of the design:
// RAM initialisation, sign-slice subtraction, the repeated (recirculated)
// addressing with write-back, slices whose address repeats within one update,
// and convergence (mean square error falls).
`timescale 1ns/1ps
module tb_da_lms_filter;
  import da_lms_model_pkg::*;

  localparam int N = 4, B = 8, DW = 8, PW = 14, PFRAC = 10, MU = 1;
  localparam int NS = 400;

  logic clk = 0, rst_n = 0;
  logic signed [B-1:0]  s_k;
  logic signed [DW-1:0] d_k;
  logic sc, y_valid, ready;
  logic signed [DW-1:0] y_k, e_k;

  da_lms_filter #(.N(N), .B(B), .DW(DW), .PW(PW), .PFRAC(PFRAC), .MU_SHIFT(MU)) dut (
    .clk, .rst_n, .s_k, .d_k, .sc, .y_k, .y_valid, .e_k, .ready
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint s_seq [NS];
  longint d_seq [NS];
  da_lms_model #(N, B, DW, PW, PFRAC, MU) model = new();

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Input and desired signals: d(n) = 0.5 s(n) - 0.25 s(n-1) + 0.125 s(n-2)
  // + 0.0625 s(n-3) + small noise, in DW-bit fractions.
  initial begin
    automatic real h [4] = '{0.5, -0.25, 0.125, 0.0625};
    automatic real acc;
    for (int n = 0; n < NS; n++) begin
      s_seq[n] = longint'($signed(B'($urandom)));
      acc = 0.0;
      for (int m = 0; m < 4; m++)
        if (n - m >= 0) acc += h[m] * real'(s_seq[n-m]) / real'(1 << (B - 1));
      acc += (real'($urandom_range(0, 200)) - 100.0) / 100.0 / real'(1 << (DW - 1));
      d_seq[n] = longint'($rtoi(acc * real'(1 << (DW - 1))));
      if (d_seq[n] >  (1 << (DW - 1)) - 1) d_seq[n] =  (1 << (DW - 1)) - 1;
      if (d_seq[n] < -(1 << (DW - 1)))     d_seq[n] = -(1 << (DW - 1));
    end
  end

  // A/D model: the n-th sc request delivers s(n) and d(n-1).
  int n_sc = 0;
  always @(posedge clk) begin
    if (rst_n && sc) begin
      s_k  <= B'(n_sc < NS ? s_seq[n_sc] : 0);
      d_k  <= DW'((n_sc > 0 && n_sc <= NS) ? d_seq[n_sc-1] : 0);
      n_sc <= n_sc + 1;
    end
  end

  // Mechanism counters.
  int n_init_writes = 0, n_sign_sub = 0, n_wb = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ctrl.init && dut.ctrl.rd_wr)            n_init_writes++;
    if (dut.ctrl.lacc && dut.ctrl.s_a && dut.p_rd != 0) n_sign_sub++;
    if (dut.ctrl.re_turn && dut.ctrl.rd_wr && dut.p_new != dut.p_rd) n_wb++;
  end

  // Compare every output with the model; check the sample period.
  int  n_out = 0;
  longint last_cyc = -1, cyc = 0;
  real mse_first = 0.0, mse_last = 0.0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && y_valid && n_out < NS) begin
    model.step(s_seq[n_out], d_seq[n_out]);
    check(longint'(y_k) == model.y_out,
          $sformatf("y[%0d] = %0d, expected %0d", n_out, y_k, model.y_out));
    check(longint'(e_k) == model.e_out,
          $sformatf("e[%0d] = %0d, expected %0d", n_out, e_k, model.e_out));
    if (last_cyc >= 0)
      check(cyc - last_cyc == 2 * B + 2,
            $sformatf("sample period %0d cycles, expected %0d", cyc - last_cyc, 2 * B + 2));
    last_cyc = cyc;
    if (n_out < 50)       mse_first += real'(e_k) * real'(e_k);
    if (n_out >= NS - 50) mse_last  += real'(e_k) * real'(e_k);
    n_out++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    check(n_init_writes == (1 << N), $sformatf("init wrote %0d words", n_init_writes));
    wait (n_out == NS);
    @(posedge clk);
    mse_first /= 50.0 * real'(1 << (2 * (DW - 1)));
    mse_last  /= 50.0 * real'(1 << (2 * (DW - 1)));
    $display("MSE first 50 samples %f, last 50 samples %f", mse_first, mse_last);
    $display("mechanisms: init_writes=%0d sign_slice_subtracts=%0d writebacks=%0d repeated_addresses=%0d",
             n_init_writes, n_sign_sub, n_wb, model.dup_slices);
    check(mse_last < mse_first / 4.0, "error did not converge");
    check(n_sign_sub > 0, "sign slice subtraction never happened");
    check(n_wb > 0, "partial-product write-back never happened");
    check(model.dup_slices > 0, "repeated address within an update never happened");
    check(n_sc >= NS, "too few sc requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
