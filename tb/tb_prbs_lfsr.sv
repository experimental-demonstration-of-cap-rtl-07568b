// tb_prbs_lfsr: checks the random bit generator against the PRBS7
// recurrence o[n+7] = o[n] XOR o[n+1] (x^7 + x^6 + 1) started from the
// all-ones seed, under random back-pressure, and checks that run = 0
// stops the stream and that the period is 127 with 64 ones.
module tb_prbs_lfsr;
  logic clk = 0, rst_n = 0, run = 0, bit_ready = 0;
  logic bit_valid, bit_o;
  int checks = 0, failures = 0;

  prbs_lfsr dut (.clk, .rst_n, .run, .bit_valid, .bit_ready, .bit_o);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ref_bits [$];
  int n_got = 0, ones = 0;

  initial begin
    for (int i = 0; i < 7; i++) ref_bits.push_back(1'b1);
    for (int i = 7; i < 400; i++) ref_bits.push_back(ref_bits[i-7] ^ ref_bits[i-6]);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Not running: no valid, register holds.
    bit_ready <= 1;
    repeat (5) @(posedge clk);
    checks++; if (bit_valid !== 1'b0 || bit_o !== 1'b1) begin failures++; $display("idle mismatch"); end
    run <= 1;
    while (n_got < 300) begin
      bit_ready <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (bit_valid && bit_ready) begin
        checks++;
        if (bit_o !== ref_bits[n_got]) begin
          failures++;
          $display("bit %0d: got %0b want %0b", n_got, bit_o, ref_bits[n_got]);
        end
        if (n_got < 127) ones += bit_o;
        n_got++;
      end
    end
    checks++; if (ones != 64) begin failures++; $display("ones per period %0d", ones); end
    for (int i = 0; i < 127; i++) begin
      checks++; if (ref_bits[i] != ref_bits[i+127]) failures++;
    end
    // run low stops it
    run <= 0;
    @(posedge clk);
    checks++; if (bit_valid !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
