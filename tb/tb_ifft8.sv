// tb_ifft8: loads random blocks (complex moduli below full scale, plus an
// impulse and a single-tone block) with random input gaps and random
// output back-pressure, and compares every output with a floating-point
// inverse DFT scaled by 1/N (tolerance 4 LSB). Checks the timing: the
// first output is valid 12 cycles after the last input is taken, a block
// takes 28 cycles with both sides always ready, and the output holds its
// value while out_ready is low.
module tb_ifft8;
  import cap_ref_pkg::*;
  localparam int N = 8, W = 16;
  localparam int CALC = N / 2 * $clog2(N);   // 12 cycles for N = 8
  localparam int PERIOD = 2 * N + CALC;      // 28 cycles for N = 8

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;
  int checks = 0, failures = 0;

  ifft8 #(.N(N), .W(W)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_re, .in_im,
                             .out_valid, .out_ready, .out_re, .out_im);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Blocks sent, in order.
  real  blk_re [$][], blk_im [$][];
  real  cur_re [], cur_im [];
  int   n_in = 0, n_out = 0, cyc = 0, last_in_cyc = 0;
  bit   rnd_in = 1, rnd_out = 1;
  bit   hold_pending = 0;
  logic signed [W-1:0] held_re, held_im;
  real  exp_re [], exp_im [];
  bit   first_of_block = 1;
  int   lat_checked = 0;
  int   blk_start [$];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // output side
    if (out_valid) begin
      if (hold_pending) begin
        checks++;
        if (out_re !== held_re || out_im !== held_im) begin failures++; $display("output changed under back-pressure"); end
      end
      if (first_of_block && lat_checked < 20) begin
        checks++; lat_checked++;
        if (cyc - last_in_cyc != CALC + 1) begin failures++; $display("latency %0d cycles", cyc - last_in_cyc - 1); end
      end
      first_of_block = 0;
      hold_pending = !out_ready;
      held_re = out_re; held_im = out_im;
      if (out_ready) begin
        automatic int b = n_out / N, k = n_out % N;
        if (k == 0) ref_idft(blk_re[b], blk_im[b], exp_re, exp_im);
        checks += 2;
        if ((real'(out_re) - exp_re[k]) ** 2 > 16.0 || (real'(out_im) - exp_im[k]) ** 2 > 16.0) begin
          failures++;
          if (failures < 10) $display("blk %0d out %0d got (%0d,%0d) want (%f,%f)", b, k, out_re, out_im, exp_re[k], exp_im[k]);
        end
        n_out++;
        if (k == N - 1) first_of_block = 1;
      end
    end else hold_pending = 0;
    // input side
    if (in_valid && in_ready) begin
      automatic int k = n_in % N;
      if (k == 0) begin cur_re = new[N]; cur_im = new[N]; blk_start.push_back(cyc); end
      cur_re[k] = real'(in_re);
      cur_im[k] = real'(in_im);
      if (k == N - 1) begin blk_re.push_back(cur_re); blk_im.push_back(cur_im); last_in_cyc = cyc; end
      n_in++;
    end
  end

  // Drive the next input word of block number blk, word k.
  task automatic pick(int blk, int k);
    if (blk == 0) begin          // impulse at k = 0: flat output
      in_re <= (k == 0) ? 16'sd16000 : 16'sd0;
      in_im <= '0;
    end else if (blk == 1) begin // single bin 1: complex exponential out
      in_re <= (k == 1) ? 16'sd24000 : 16'sd0;
      in_im <= (k == 1) ? -16'sd8000 : 16'sd0;
    end else begin
      in_re <= W'($urandom_range(0, 46000) - 23000);
      in_im <= W'($urandom_range(0, 46000) - 23000);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Random phase.
    while (n_in < 40 * N) begin
      in_valid  <= ($urandom_range(0, 3) != 0);
      out_ready <= ($urandom_range(0, 3) != 0);
      pick(n_in / N, n_in % N);
      @(posedge clk);
    end
    in_valid <= 0;
    out_ready <= 1;
    wait (n_out == n_in);
    @(posedge clk);
    // Always-ready phase: block period.
    begin
      in_valid <= 1;
      while (1) begin
        pick(n_in / N, n_in % N);
        @(posedge clk);
        if (n_in >= 50 * N) in_valid <= 0;
        if (n_out == 50 * N) break;
      end
      for (int b = 42; b < 50; b++) begin
        checks++;
        if (blk_start[b] - blk_start[b-1] != PERIOD) begin failures++; $display("block %0d took %0d cycles", b - 1, blk_start[b] - blk_start[b-1]); end
      end
    end
    checks++;
    if (n_out != n_in) begin failures++; $display("blocks in %0d out %0d", n_in, n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
