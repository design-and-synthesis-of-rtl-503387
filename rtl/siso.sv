// siso: serial-in serial-out register holding one delayed input sample.
//
// A chain of these behind the PISO forms the tap delay line of the DA filter.
// With shift high and re_turn low the register takes sin at its MSB and moves
// one place towards the LSB: after B such cycles it holds the word that its
// predecessor held, i.e. every sample has moved one tap down the line. With
// shift and re_turn both high the LSB is fed back to the MSB instead, so after
// B cycles the word is back in place and its bits have been presented, LSB
// first, a second time. The filter uses this to address the RAM again for
// the partial-product update.
//
// Serial chaining follows the architecture; the recirculating mode driven by
// re_turn is this design's reading of how the addresses are repeated.
module siso #(
  parameter int B = 16  // input word length
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic re_turn,
  input  logic sin,
  output logic sout
);
  logic [B-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (shift) sr <= {re_turn ? sr[0] : sin, sr[B-1:1]};
  end

  assign sout = sr[0];
endmodule
