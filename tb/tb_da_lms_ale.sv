// tb_da_lms_ale: noise-cancellation workload. The filter runs as an adaptive
// line enhancer for 1000 iterations with the sizes of the drawn architecture
// (8 taps, 8-bit samples, 256 partial products): x(n) is a sinusoid buried
// in white noise, the filter input is x delayed by one sample and the
// desired response is x itself, so the filter learns to predict the tone
// and y(k) is the cleaned signal. Every y(k) and e(k) is compared with the
// bit-exact reference model, the sample period is checked, and the mean
// square error of the first and last 100 iterations and the tone-to-noise
// power of input and output are printed.
`timescale 1ns/1ps
module tb_da_lms_ale;
  import da_lms_model_pkg::*;

  localparam int N = 8, B = 8, DW = 8, PW = 14, PFRAC = 10, MU = 1;
  localparam int NS = 1000, WIN = 100;

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

  // x(n) = 0.4 sin(2 pi n / 10) + uniform noise in [-0.3, 0.3];
  // filter input s(n) = x(n-1), desired response d(n) = x(n).
  real tone [NS];
  initial begin
    automatic real x [NS];
    for (int n = 0; n < NS; n++) begin
      tone[n] = 0.4 * $sin(2.0 * 3.14159265358979 * real'(n) / 10.0);
      x[n] = tone[n] + (real'($urandom_range(0, 600)) - 300.0) / 1000.0;
      d_seq[n] = longint'($rtoi(x[n] * real'(1 << (DW - 1))));
      s_seq[n] = (n == 0) ? 0 : longint'($rtoi(x[n-1] * real'(1 << (B - 1))));
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
  real mse_first = 0.0, mse_last = 0.0, out_noise = 0.0, in_noise = 0.0;
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
    if (n_out < WIN)       mse_first += real'(e_k) * real'(e_k);
    if (n_out >= NS - WIN) mse_last  += real'(e_k) * real'(e_k);
    if (n_out >= NS - WIN) begin
      out_noise += (real'(y_k) / real'(1 << (DW - 1)) - tone[n_out]) ** 2;
      in_noise  += (real'(d_seq[n_out]) / real'(1 << (DW - 1)) - tone[n_out]) ** 2;
    end
    n_out++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    check(n_init_writes == (1 << N), $sformatf("init wrote %0d words", n_init_writes));
    wait (n_out == NS);
    @(posedge clk);
    mse_first /= real'(WIN) * real'(1 << (2 * (DW - 1)));
    mse_last  /= real'(WIN) * real'(1 << (2 * (DW - 1)));
    $display("MSE first %0d iterations %f, last %0d iterations %f", WIN, mse_first, WIN, mse_last);
    $display("last %0d iterations: noise power around the tone, input %f, output %f", WIN, in_noise / real'(WIN), out_noise / real'(WIN));
    $display("mechanisms: init_writes=%0d sign_slice_subtracts=%0d writebacks=%0d repeated_addresses=%0d",
             n_init_writes, n_sign_sub, n_wb, model.dup_slices);
    check(mse_last < mse_first, "error did not fall");
    check(n_sign_sub > 0, "sign slice subtraction never happened");
    check(n_wb > 0, "partial-product write-back never happened");
    check(model.dup_slices > 0, "repeated address within an update never happened");
    check(n_sc >= NS, "too few sc requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
