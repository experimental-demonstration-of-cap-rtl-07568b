// tb_sipo: drives random bits with random valid and ready and checks that
// every symbol is the next four accepted bits, first bit as MSB; then
// checks the rate of one symbol per four cycles with both sides always on.
module tb_sipo;
  logic clk = 0, rst_n = 0;
  logic bit_valid = 0, bit_i = 0, sym_ready = 0;
  logic bit_ready, sym_valid;
  logic [3:0] sym_idx;
  int checks = 0, failures = 0;

  sipo #(.BITS(4)) dut (.clk, .rst_n, .bit_valid, .bit_ready, .bit_i, .sym_valid, .sym_ready, .sym_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit sent [$];
  int n_sym = 0;

  task automatic cycle(bit rnd);
    bit_valid <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
    bit_i     <= 1'($urandom);
    sym_ready <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;
    @(posedge clk);
    if (sym_valid && sym_ready) begin
      logic [3:0] want;
      for (int k = 0; k < 4; k++) want = {want[2:0], sent.pop_front()};
      checks++;
      if (sym_idx !== want) begin failures++; $display("sym %0d got %h want %h", n_sym, sym_idx, want); end
      n_sym++;
    end
    if (bit_valid && bit_ready) sent.push_back(bit_i);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++; if (sym_valid !== 1'b0) failures++;
    for (int i = 0; i < 2000; i++) cycle(1);
    begin
      int n0, cyc;
      n0 = n_sym;
      for (cyc = 0; cyc < 400; cyc++) cycle(0);
      checks++;
      if (n_sym - n0 < 99 || n_sym - n0 > 101) begin failures++; $display("rate: %0d symbols in 400 cycles", n_sym - n0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
