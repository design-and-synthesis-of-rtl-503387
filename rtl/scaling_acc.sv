// scaling_acc: shift-accumulator of the DA filter (ADD/SUB, ACC and the 2^-1
// feedback).
//
// One RAM word p_in arrives per cycle, LSB slice first. With lacc high the
// accumulator becomes  acc/2 + p  (s_a low) or  acc/2 - p  (s_a high, used
// for the sign slice b_0, whose weight in F is -2^0). After the B slices of a
// sample, starting from a cleared ACC,
//     acc = 2^(B-1) * ( -P[A_0] + sum_{j=1..B-1} 2^-j P[A_j] ) = 2^(B-1) * y(k).
// p_in is pre-shifted left by B-1 places, so the halving never drops a bit
// and y is exact; y is acc shifted back down (PW+1 bits, same binary point as
// the partial products). clacc clears ACC and wins over lacc.
//
// The add/subtract unit, ACC, the 2^-1 feedback and the s_a, lacc and clacc
// strobes follow the architecture; the B-1 guard bits are this design's
// choice.
module scaling_acc #(
  parameter int PW = 24,  // partial-product width
  parameter int B  = 16   // input word length = slices per sample
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 lacc,
  input  logic                 clacc,
  input  logic                 s_a,
  input  logic signed [PW-1:0] p_in,
  output logic signed [PW:0]   y
);
  localparam int AW = PW + B;

  logic signed [AW-1:0] acc, p_ext, half;

  assign p_ext = AW'(p_in) <<< (B - 1);
  assign half  = acc >>> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (clacc)  acc <= '0;
    else if (lacc)   acc <= s_a ? half - p_ext : half + p_ext;
  end

  assign y = (PW+1)'(acc >>> (B - 1));
endmodule
