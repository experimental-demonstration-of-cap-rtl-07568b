// prbs_lfsr: pseudo-random bit generator, the transmitter's data source.
//
// A Fibonacci linear feedback shift register. Each accepted bit shifts the
// register left by one; the new least significant bit is the XOR of the
// register bits selected by TAPS, and the bit sent out is the register's
// most significant bit. With the default WIDTH = 7 and TAPS = 7'b1100000
// the register runs the PRBS7 sequence x^7 + x^6 + 1 (period 127).
//
// Interface: a valid/ready bit stream. bit_valid follows the run input;
// the register advances on every cycle with bit_valid && bit_ready.
// Timing: bit_o is a register output, one bit per cycle at most.
//
// The source description only names a random generator (and lists LFSR
// among its abbreviations); the polynomial, seed and handshake are this
// design's choices.
module prbs_lfsr #(
  parameter int            WIDTH = 7,
  parameter logic [WIDTH-1:0] TAPS = 7'b1100000,
  parameter logic [WIDTH-1:0] SEED = '1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,        // produce bits while high
  output logic bit_valid,
  input  logic bit_ready,
  output logic bit_o
);

  logic [WIDTH-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      state <= SEED;
    else if (bit_valid && bit_ready) state <= {state[WIDTH-2:0], ^(state & TAPS)};
  end

  assign bit_valid = run;
  assign bit_o     = state[WIDTH-1];

  // An all-zero register would lock the generator up.
  initial assert (SEED != '0) else $error("prbs_lfsr: SEED must be non-zero");
  always_comb
    if (rst_n) assert (state != '0) else $error("prbs_lfsr: register locked at zero");

endmodule
