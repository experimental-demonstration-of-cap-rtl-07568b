// sipo: serial-in parallel-out converter that groups the bit stream into
// symbol indices of BITS bits.
//
// Bits are shifted in from the right, so the first bit received becomes the
// most significant bit of the index. When BITS bits have been collected the
// word is offered on sym_valid/sym_idx and held until sym_ready; a new bit
// may be accepted in the same cycle the full word leaves, so a steady stream
// of one bit per cycle gives one symbol every BITS cycles.
//
// The source description says the encoder takes blocks of m bits per
// symbol and that a serial-to-parallel converter forms 4-bit values for a
// 16-point mapper; the bit order and handshake are this design's choices.
module sipo #(
  parameter int BITS = cap_pkg::BITS_PER_SYM
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bit_valid,
  output logic            bit_ready,
  input  logic            bit_i,
  output logic            sym_valid,
  input  logic            sym_ready,
  output logic [BITS-1:0] sym_idx
);

  logic [BITS-1:0]         shreg;
  logic [$clog2(BITS+1)-1:0] count;   // bits held, 0..BITS

  logic full, take_bit, give_sym;
  assign full      = (count == ($bits(count))'(BITS));
  assign give_sym  = full && sym_ready;
  assign bit_ready = !full || sym_ready;
  assign take_bit  = bit_valid && bit_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      count <= '0;
    end else begin
      if (take_bit) shreg <= {shreg[BITS-2:0], bit_i};
      case ({give_sym, take_bit})
        2'b10:   count <= '0;
        2'b11:   count <= ($bits(count))'(1);
        2'b01:   count <= count + 1'b1;
        default: ;
      endcase
    end
  end

  assign sym_valid = full;
  assign sym_idx   = shreg;

endmodule
