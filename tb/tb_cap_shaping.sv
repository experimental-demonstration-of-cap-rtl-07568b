// tb_cap_shaping: feeds random constellation symbols (with random gaps) to
// the shaping modulator and compares every output sample with the direct
// convolution s[n] = sum a_k f_I[n-4k] - b_k f_Q[n-4k] of the symbols, with
// taps computed from the filter formula. Also checks that a symbol offered
// every cycle is taken once per 4 cycles and gives a gap-free output, and
// that the first sample appears one cycle after the symbol is taken.
module tb_cap_shaping;
  import cap_pkg::*;
  import cap_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sym_valid = 0;
  logic sym_ready;
  sym_t sym = '0;
  logic samp_valid;
  logic signed [SHAPE_OUT_W-1:0] samp;
  int checks = 0, failures = 0;

  cap_shaping dut (.clk, .rst_n, .sym_valid, .sym_ready, .sym, .samp_valid, .samp);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fi [16], fq [16];
  int sa [$], sb [$];       // accepted symbols
  int n_out = 0;
  int accept_cycle [$];
  int cyc = 0;

  function automatic int expect_sample(int n);
    int k = n / 4, p = n % 4, acc = 0;
    for (int m = 0; m < 4; m++)
      if (k - m >= 0) acc += sa[k-m] * fi[p + 4*m] - sb[k-m] * fq[p + 4*m];
    return acc;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (samp_valid) begin
      if (n_out % 4 == 0) begin
        // first sample of a symbol: registered one cycle after the accept
        checks++;
        if (cyc - accept_cycle[n_out / 4] != 2) begin
          failures++;
          $display("latency: symbol %0d taken at %0d, first sample at %0d", n_out / 4, accept_cycle[n_out / 4], cyc);
        end
      end
      checks++;
      if (int'(samp) != expect_sample(n_out)) begin
        failures++;
        if (failures < 10) $display("sample %0d got %0d want %0d", n_out, samp, expect_sample(n_out));
      end
      n_out++;
    end
    if (sym_valid && sym_ready) begin
      sa.push_back(int'(sym.a));
      sb.push_back(int'(sym.b));
      accept_cycle.push_back(cyc);
    end
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      fi[n] = ref_coef(0, n, 16, 4, 2047);
      fq[n] = ref_coef(1, n, 16, 4, 2047);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Phase 1: random gaps.
    for (int i = 0; i < 2000; i++) begin
      automatic int idx = $urandom_range(0, 15);
      sym_valid <= ($urandom_range(0, 3) == 0);
      sym.a <= SYM_W'(REF_A[idx]);
      sym.b <= SYM_W'(REF_B[idx]);
      @(posedge clk);
    end
    // Phase 2: always valid; rate and latency.
    begin
      int n0, o0;
      n0 = sa.size();
      sym_valid <= 1'b0;
      repeat (8) @(posedge clk);
      o0 = n_out;
      sym_valid <= 1'b1;
      for (int i = 0; i < 400; i++) begin
        automatic int idx = $urandom_range(0, 15);
        sym.a <= SYM_W'(REF_A[idx]);
        sym.b <= SYM_W'(REF_B[idx]);
        @(posedge clk);
      end
      sym_valid <= 1'b0;
      checks++;
      if (sa.size() - n0 != 100) begin failures++; $display("rate: %0d symbols in 400 cycles", sa.size() - n0); end
      checks++;
      if (n_out - o0 < 396) begin failures++; $display("gaps: %0d samples in 400 cycles", n_out - o0); end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != 4 * sa.size()) begin failures++; $display("count %0d samples for %0d symbols", n_out, sa.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
