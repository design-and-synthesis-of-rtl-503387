// piso: parallel-in serial-out register for the newest input sample s(k).
//
// On lr the B-bit word from the A/D is loaded. Each cycle with shift high the
// register moves one place towards the LSB, so sout presents the bits
// b_{B-1}(k) ... b_0(k) of the sample LSB first (b_0 is the sign bit, as in
// the DA scaling vector F = [-2^0, 2^-1, ..., 2^-(B-1)]). Zeros enter at the
// top. sout is the register's current LSB, so bit j is visible in the same
// cycle the RAM is addressed with it.
//
// The load-and-shift behaviour follows the architecture; LSB-first order and
// the reset value of zero (the "initialise s(k-i)" step) are this design's
// choices. lr has priority over shift.
module piso #(
  parameter int B = 16  // input word length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lr,
  input  logic         shift,
  input  logic [B-1:0] din,
  output logic         sout
);
  logic [B-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (lr)    sr <= din;
    else if (shift) sr <= {1'b0, sr[B-1:1]};
  end

  assign sout = sr[0];
endmodule
