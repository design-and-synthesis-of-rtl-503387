// load_buffer: holding register with a load strobe.
//
// The filter uses three of them: one captures the filter output y(k) from the
// accumulator (lr), one the desired response d(k) (lr), and one holds y(k)
// for the D/A (lbuff_op). q keeps its value until the next load; reset gives
// zero. The three buffers and their strobes come from the architecture; the
// reset value is this design's choice.
module load_buffer #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
