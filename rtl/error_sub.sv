// error_sub: estimation error e(k) = d(k) - y(k).
//
// d is a DW-bit two's-complement fraction (DW-1 fraction bits, as the A/D
// samples are). y is the filter output with PFRAC fraction bits. d is aligned
// to y's binary point, then y is subtracted; the result is two bits wider
// than a partial product, so it cannot overflow. Purely combinational.
// The subtraction is the architecture's; the number formats are this
// design's choice.
module error_sub #(
  parameter int DW    = 16,  // width of d(k)
  parameter int PW    = 24,  // partial-product width (y has PW+1 bits)
  parameter int PFRAC = 20   // fraction bits of y and of the partial products
) (
  input  logic signed [DW-1:0] d,
  input  logic signed [PW:0]   y,
  output logic signed [PW+1:0] e
);
  logic signed [PW+1:0] d_al;

  assign d_al = (PW+2)'(d) <<< (PFRAC - (DW - 1));
  assign e    = d_al - (PW+2)'(y);
endmodule
