// ifft_ram: one of the four data memories of the IFFT (the real or the
// imaginary part of one bank).
//
// DEPTH words of W bits with one write port and one read port. The write
// is synchronous; the read is asynchronous (as in distributed/LUT RAM), so
// the IFFT can read both butterfly operands, compute and write the results
// back within one cycle. A read of the word being written returns the old
// contents. The contents are not reset.
//
// The source description states that the IFFT uses four RAMs; their size
// and port structure are this design's choices.
module ifft_ram #(
  parameter int W     = cap_pkg::DATA_W,
  parameter int DEPTH = cap_pkg::N_FFT / 2,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
