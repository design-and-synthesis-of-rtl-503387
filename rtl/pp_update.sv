// pp_update: new-partial-product circuit of the DA LMS filter.
//
// Implements the multiplier-less update P_j(k+1) = P_j(k) + c * e(k) * F_j for
// the partial product addressed by bit slice j, with F = [-2^0, 2^-1, ...,
// 2^-(B-1)] and the constant c = 2^-MU_SHIFT. A bank of B fixed arithmetic
// shifts forms c*e*F_j for every j at once (the -2^0 entry is negated); jbit
// selects one, and the sum with the RAM word is saturated to PW bits before
// it is written back. Purely combinational; the result is written in the
// cycle the RAM word is read.
//
// The shift bank, the adder and the power-of-two constant follow the
// architecture; saturation and MU_SHIFT's default (c = 1/2) are this
// design's choices.
module pp_update #(
  parameter int B        = 16,  // input word length = entries in the bank
  parameter int PW       = 24,  // partial-product width
  parameter int MU_SHIFT = 1,   // c = 2^-MU_SHIFT
  localparam int JW      = (B > 1) ? $clog2(B) : 1
) (
  input  logic signed [PW+1:0] e,
  input  logic [JW-1:0]        jbit,
  input  logic signed [PW-1:0] p_old,
  output logic signed [PW-1:0] p_new
);
  localparam int EW = PW + 2;
  localparam logic signed [PW+2:0] PMAX = {4'b0000, {(PW-1){1'b1}}};
  localparam logic signed [PW+2:0] PMIN = {4'b1111, {(PW-1){1'b0}}};

  logic signed [EW:0]   bank [B];
  logic signed [EW:0]   delta;
  logic signed [PW+2:0] sum;

  always_comb begin
    for (int j = 0; j < B; j++) begin
      bank[j] = (EW+1)'(e) >>> (j + MU_SHIFT);
      if (j == 0) bank[j] = -bank[j];
    end
    delta = bank[jbit];
    sum   = (PW+3)'(p_old) + (PW+3)'(delta);
    if (sum > PMAX)      p_new = PMAX[PW-1:0];
    else if (sum < PMIN) p_new = PMIN[PW-1:0];
    else                 p_new = sum[PW-1:0];
  end
endmodule
