// ifft8: N-point inverse FFT (N = 8 by default, so three radix-2 stages)
// computed in place on a single butterfly, four RAMs and a control FSM.
//
// Algorithm: radix-2 decimation in time. Inputs are written in bit-reversed
// order; stage s (0..log2N-1) combines elements i and j = i + 2^s, for the
// N/2 index pairs with bit s of i clear, with the twiddle angle
// +2*pi*pos/2^(s+1), pos = i mod 2^s. The outputs then come out in natural
// order, scaled by 1/N (each butterfly halves its results):
//   out[n] = (1/N) * sum_k in[k] * exp(+j*2*pi*k*n/N).
//
// Memory: element e lives in bank parity(e) (XOR of its index bits) at
// address e >> 1. The two operands of every butterfly differ in exactly one
// index bit, so they always sit in different banks, and each bank is split
// into a real and an imaginary RAM: four RAMs of N/2 words, each needing
// only one read and one write port. Multiplexers steer the bank outputs to
// the butterfly's a/b inputs and its x/y results back to the right bank.
//
// Interface and timing:
//   LOAD    in_ready = 1; N samples accepted on in_valid/in_ready.
//   CALC    N/2 * log2N cycles (12 for N = 8), one butterfly per cycle.
//   UNLOAD  out_valid = 1; N samples leave in order on out_valid/out_ready.
// A block therefore takes at least N + N/2*log2N + N cycles (28 for N = 8);
// out_valid rises N/2*log2N clock edges (12 for N = 8) after the edge that
// takes the last input.
// A new block cannot be loaded while one is being computed or unloaded.
//
// Taken from the source description: IFFT, three stages, one radix
// butterfly, four RAMs, CORDIC twiddles and multiplexers between them.
// The bank mapping, the stream handshake and the scaling are this design's
// choices.
module ifft8
  import cap_pkg::*;
#(
  parameter int N = N_FFT,
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic         out_valid,
  input  logic         out_ready,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int LN    = $clog2(N);
  localparam int DEPTH = N / 2;
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int SW    = (LN > 1) ? $clog2(LN) : 1;

  initial assert (N >= 4 && (1 << LN) == N) else $error("ifft8: N must be a power of two >= 4");

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_UNLOAD} state_t;
  state_t state;

  logic [LN-1:0]   cnt;     // LOAD / UNLOAD element counter
  logic [SW-1:0]   stage;   // CALC stage
  logic [LN-2:0]   bf;      // CALC butterfly within the stage

  // ------------------------------------------------------------ indexing
  function automatic logic [LN-1:0] bitrev(logic [LN-1:0] v);
    logic [LN-1:0] r;
    for (int k = 0; k < LN; k++) r[k] = v[LN-1-k];
    return r;
  endfunction

  logic [LN-1:0]    idx_i, idx_j, pos;
  logic signed [ANG_W-1:0] ang;
  logic             par_i;   // bank of operand a (operand b is in the other)

  always_comb begin
    pos   = '0;
    idx_i = '0;
    for (int k = 0; k < LN; k++) begin
      if (k < int'(stage))       begin pos[k] = bf[k]; idx_i[k] = bf[k]; end
      else if (k > int'(stage))  idx_i[k] = bf[(k > 0) ? k - 1 : 0];
    end
    idx_j = idx_i | (LN'(1) << stage);
    ang   = ANG_W'(pos) << (ANG_W - 1 - int'(stage));
    par_i = ^idx_i;
  end

  // ------------------------------------------------------------ RAMs
  logic          we   [2];
  logic [AW-1:0] waddr[2], raddr[2];
  logic [W-1:0]  wre  [2], wim[2], rre[2], rim[2];

  for (genvar g = 0; g < 2; g++) begin : g_bank
    ifft_ram #(.W(W), .DEPTH(DEPTH)) u_re (
      .clk, .we(we[g]), .waddr(waddr[g]), .wdata(wre[g]), .raddr(raddr[g]), .rdata(rre[g])
    );
    ifft_ram #(.W(W), .DEPTH(DEPTH)) u_im (
      .clk, .we(we[g]), .waddr(waddr[g]), .wdata(wim[g]), .raddr(raddr[g]), .rdata(rim[g])
    );
  end

  // ------------------------------------------------------------ butterfly
  logic signed [W-1:0] a_re, a_im, b_re, b_im, x_re, x_im, y_re, y_im;

  assign a_re = par_i ? rre[1] : rre[0];
  assign a_im = par_i ? rim[1] : rim[0];
  assign b_re = par_i ? rre[0] : rre[1];
  assign b_im = par_i ? rim[0] : rim[1];

  ifft_butterfly #(.W(W)) u_bfly (
    .a_re, .a_im, .b_re, .b_im, .ang,
    .x_re, .x_im, .y_re, .y_im
  );

  // ------------------------------------------------------------ steering
  logic [LN-1:0] ld_idx;
  logic          ld_fire, ul_fire, last_bf;

  assign ld_idx  = bitrev(cnt);
  assign ld_fire = (state == S_LOAD) && in_valid;
  assign ul_fire = (state == S_UNLOAD) && out_ready;
  assign last_bf = (bf == '1) && (stage == SW'(LN - 1));

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      we[k]    = 1'b0;
      waddr[k] = '0;
      wre[k]   = '0;
      wim[k]   = '0;
      raddr[k] = AW'(cnt >> 1);
    end
    unique case (state)
      S_LOAD: begin
        we[^ld_idx]    = ld_fire;
        waddr[^ld_idx] = AW'(ld_idx >> 1);
        wre[^ld_idx]   = in_re;
        wim[^ld_idx]   = in_im;
      end
      S_CALC: begin
        raddr[par_i]  = AW'(idx_i >> 1);
        raddr[!par_i] = AW'(idx_j >> 1);
        we[0] = 1'b1;
        we[1] = 1'b1;
        waddr[par_i]  = AW'(idx_i >> 1);
        waddr[!par_i] = AW'(idx_j >> 1);
        wre[par_i]    = x_re;
        wim[par_i]    = x_im;
        wre[!par_i]   = y_re;
        wim[!par_i]   = y_im;
      end
      default: ;   // S_UNLOAD reads at cnt >> 1
    endcase
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_UNLOAD);
  assign out_re    = (^cnt) ? rre[1] : rre[0];
  assign out_im    = (^cnt) ? rim[1] : rim[0];

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stage <= '0;
      bf    <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (ld_fire) begin
          cnt <= cnt + 1'b1;
          if (cnt == '1) begin
            state <= S_CALC;
            stage <= '0;
            bf    <= '0;
          end
        end
        S_CALC: begin
          bf <= bf + 1'b1;
          if (bf == '1) stage <= stage + 1'b1;
          if (last_bf) state <= S_UNLOAD;
        end
        S_UNLOAD: if (ul_fire) begin
          cnt <= cnt + 1'b1;
          if (cnt == '1) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
