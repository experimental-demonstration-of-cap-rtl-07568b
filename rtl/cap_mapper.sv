// cap_mapper: 16-point constellation mapper (the encoder of the CAP
// transmitter).
//
// A 4-bit index d[3:0] becomes the symbol pair (a_k, b_k) on the square
// grid {-3,-1,+1,+3}^2:
//   d[3] sign of a_k (1 = negative)   d[1] magnitude of a_k (1 = 3, 0 = 1)
//   d[2] sign of b_k (1 = negative)   d[0] magnitude of b_k (1 = 3, 0 = 1)
// so 0000 -> 1+1j, 0001 -> 1+3j, 0010 -> 3+1j, 0100 -> 1-1j, 1111 -> -3-3j.
// This is the 16-point mapping table of the source description, with its
// levels written as two's-complement SYM_W-bit words.
//
// Interface: purely combinational; the valid/ready handshake of the symbol
// stream passes around it unchanged.
module cap_mapper
  import cap_pkg::*;
(
  input  sym_idx_t idx,
  output sym_t     sym
);

  // One axis: sign bit and magnitude bit to a two's-complement level.
  function automatic logic signed [SYM_W-1:0] level(logic neg, logic big);
    logic signed [SYM_W-1:0] mag;
    mag = big ? SYM_W'(3) : SYM_W'(1);
    return neg ? -mag : mag;
  endfunction

  always_comb begin
    sym.a = level(idx[3], idx[1]);
    sym.b = level(idx[2], idx[0]);
  end

endmodule
