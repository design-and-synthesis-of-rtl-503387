// da_lms_filter: 16-bit LMS adaptive FIR filter built with distributed
// arithmetic (DA), without multipliers.
//
// Instead of N coefficients the filter keeps a RAM of 2^N partial products:
// entry a is the sum of the coefficients whose tap bit is set in a. The input
// samples sit in a bit-serial delay line (a PISO for s(k), SISOs for the older
// samples). In every cycle of the filtering pass one bit slice of all N taps
// addresses the RAM, and a shift-accumulator combines the B words read into
//     y(k) = -P[A_0] + sum_{j=1..B-1} 2^-j P[A_j].
// The error e(k) = d(k) - y(k) then drives the LMS update done directly on the
// partial products: the same B addresses are produced again by recirculating
// the SISOs, and each addressed word gets  2^-MU_SHIFT * e(k) * F_j  added,
// F = [-2^0, 2^-1, ..., 2^-(B-1)], which a bank of fixed shifts forms.
//
// Interface and timing (one clock, asynchronous active-low reset):
//   * After reset the RAM is cleared in 2^N cycles; ready then goes high.
//   * A sample period takes 2B+2 cycles. sc pulses once per period to request
//     the next input sample; s_k must be valid by the lr strobe B cycles later
//     (at the end of the filtering pass), together with d_k, the desired
//     response for the sample that has just been filtered. In other words, at
//     the k-th lr the converter delivers s(k+1) and d(k). The very first sc/lr
//     pair, right after initialisation, loads s(0) only.
//   * y_k (DW bits, saturated) is updated and y_valid pulses for one cycle
//     two cycles after that lr; e_k is the saturated error of the same sample.
// Numbers: s_k and d_k are B- and DW-bit two's-complement fractions; partial
// products are PW bits with PFRAC fraction bits.
//
// The blocks, their connections and the strobes come from the architecture;
// widths, the step constant, the address-repeat mechanism and the sequencing
// details are this design's own choices (see the block headers).
module da_lms_filter
  import da_lms_pkg::*;
#(
  parameter int N        = 16,  // filter length (taps)
  parameter int B        = 16,  // input word length
  parameter int DW       = 16,  // width of d(k) and y(k)
  parameter int PW       = 24,  // partial-product width
  parameter int PFRAC    = 20,  // fraction bits of the partial products
  parameter int MU_SHIFT = 1    // update constant 2^-MU_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [B-1:0]  s_k,      // from the A/D
  input  logic signed [DW-1:0] d_k,      // desired response
  output logic                 sc,       // start-of-conversion to the A/D
  output logic signed [DW-1:0] y_k,      // to the D/A
  output logic                 y_valid,
  output logic signed [DW-1:0] e_k,      // error of the sample on y_k
  output logic                 ready
);
  localparam int JW = (B > 1) ? $clog2(B) : 1;
  localparam int SH = PFRAC - (DW - 1);  // binary-point gap between P and d/y

  ctrl_t         ctrl;
  logic [JW-1:0] jbit;
  logic [N-1:0]  init_addr;

  control_unit #(.N(N), .B(B)) u_ctrl (
    .clk, .rst_n, .ctrl, .jbit,   .init_addr, .ready
  );
  assign sc = ctrl.sc;

  // ---- bit-serial delay line: PISO (tap 0) and SISO_1 ... SISO_N ----------
  logic [N:0] ser;  // ser[0] = PISO output, ser[m] = SISO_m output

  piso #(.B(B)) u_piso (
    .clk, .rst_n, .lr(ctrl.lr), .shift(ctrl.shift && !ctrl.re_turn),
    .din(s_k), .sout(ser[0])
  );

  for (genvar m = 1; m <= N; m++) begin : g_siso
    siso #(.B(B)) u_siso (
      .clk, .rst_n, .shift(ctrl.shift), .re_turn(ctrl.re_turn),
      .sin(ser[m-1]), .sout(ser[m])
    );
  end

  // Filtering pass: taps s(k)..s(k-N+1) are the PISO and SISO_1..SISO_N-1.
  // Update pass: the same samples have moved to SISO_1..SISO_N.
  logic [N-1:0] addr;
  always_comb begin
    if (ctrl.init)         addr = init_addr;
    else if (ctrl.re_turn) addr = ser[N:1];
    else                   addr = ser[N-1:0];
  end

  // ---- partial-product RAM and its update path -----------------------------
  logic signed [PW-1:0] p_rd, p_new, p_wr;
  logic signed [PW+1:0] e;

  pp_ram #(.N(N), .PW(PW)) u_ram (
    .clk, .rd_wr(ctrl.rd_wr), .addr, .wdata(p_wr), .rdata(p_rd)
  );

  pp_update #(.B(B), .PW(PW), .MU_SHIFT(MU_SHIFT)) u_upd (
    .e, .jbit, .p_old(p_rd), .p_new
  );
  assign p_wr = ctrl.init ? '0 : p_new;

  // ---- shift-accumulator, buffers, error -----------------------------------
  logic signed [PW:0]   y_acc, y_buf;
  logic signed [DW-1:0] d_buf;

  scaling_acc #(.PW(PW), .B(B)) u_acc (
    .clk, .rst_n, .lacc(ctrl.lacc), .clacc(ctrl.clacc), .s_a(ctrl.s_a),
    .p_in(p_rd), .y(y_acc)
  );

  load_buffer #(.W(PW+1)) u_ybuf (
    .clk, .rst_n, .load(ctrl.lr), .d(y_acc), .q(y_buf)
  );
  load_buffer #(.W(DW)) u_dbuf (
    .clk, .rst_n, .load(ctrl.lr), .d(d_k), .q(d_buf)
  );

  error_sub #(.DW(DW), .PW(PW), .PFRAC(PFRAC)) u_err (
    .d(d_buf), .y(y_buf), .e
  );

  // Output buffer towards the D/A: y(k) straight from ACC (it still holds
  // y(k) when lbuff_op fires) and e(k), rounded down to DW bits and saturated.
  localparam logic signed [PW+1:0] OMAX = (PW+2)'(signed'({1'b0, {(DW-1){1'b1}}}));
  localparam logic signed [PW+1:0] OMIN = -OMAX - 1;

  function automatic logic signed [DW-1:0] to_dw(input logic signed [PW+1:0] v);
    logic signed [PW+1:0] t;
    t = v >>> SH;
    if (t > OMAX)      return OMAX[DW-1:0];
    else if (t < OMIN) return OMIN[DW-1:0];
    else               return t[DW-1:0];
  endfunction

  logic signed [2*DW-1:0] out_word;

  load_buffer #(.W(2*DW)) u_obuf (
    .clk, .rst_n, .load(ctrl.lbuff_op),
    .d({to_dw((PW+2)'(y_acc)), to_dw(e)}), .q(out_word)
  );
  assign y_k = out_word[2*DW-1:DW];
  assign e_k = out_word[DW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= ctrl.lbuff_op;
  end
endmodule
