// pp_ram: memory of the 2^N partial products of the DA filter.
//
// Entry a holds the sum of the coefficients w_m whose tap bit is set in the
// address a (the adaptive function space of the LMS-DA formulation). The
// address is one bit slice of the N taps. Read is asynchronous, so the word
// addressed in a cycle can be accumulated, or updated and written back, in
// that same cycle. With rd_wr high, wdata is written at the clock edge; a
// read of the same address in the next cycle returns the new value.
//
// The read/write RAM and its rd_wr strobe come from the architecture; the
// asynchronous read and the word width PW are this design's choices. The
// memory has no reset: the control unit clears it with a write sweep.
module pp_ram #(
  parameter int N  = 16,  // filter length = address bits
  parameter int PW = 24   // partial-product word width
) (
  input  logic                 clk,
  input  logic                 rd_wr,
  input  logic [N-1:0]         addr,
  input  logic signed [PW-1:0] wdata,
  output logic signed [PW-1:0] rdata
);
  logic signed [PW-1:0] mem [2**N];

  always_ff @(posedge clk) begin
    if (rd_wr) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
