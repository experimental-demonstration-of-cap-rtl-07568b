// tb_ifft_butterfly: compares the butterfly with x = (a + b e^{j theta})/2,
// y = (a - b e^{j theta})/2 in floating point for random operands whose
// moduli are below full scale, at the twiddle angles an 8-point IFFT uses
// and at random angles. Error bound: 2 LSB per component.
module tb_ifft_butterfly;
  localparam int W = 16;
  logic signed [W-1:0]  a_re, a_im, b_re, b_im, x_re, x_im, y_re, y_im;
  logic signed [15:0]   ang;
  int checks = 0, failures = 0;

  ifft_butterfly #(.W(W)) dut (.a_re, .a_im, .b_re, .b_im, .ang, .x_re, .x_im, .y_re, .y_im);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_comp();
    return $urandom_range(0, 46000) - 23000;   // modulus < 32767
  endfunction

  task automatic cmp(string nm, int got, real want);
    checks++;
    if ((real'(got) - want) > 2.0 || (want - real'(got)) > 2.0) begin
      failures++;
      if (failures < 10) $display("%s got %0d want %f", nm, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      real th, tr, ti;
      a_re = W'(rnd_comp()); a_im = W'(rnd_comp());
      b_re = W'(rnd_comp()); b_im = W'(rnd_comp());
      ang  = (i < 1600) ? 16'(8192 * (i % 4)) : 16'($urandom);
      #1;
      th = 2.0 * 3.141592653589793 * real'(ang) / 65536.0;
      tr = b_re * $cos(th) - b_im * $sin(th);
      ti = b_re * $sin(th) + b_im * $cos(th);
      cmp("x_re", x_re, (a_re + tr) / 2.0);
      cmp("x_im", x_im, (a_im + ti) / 2.0);
      cmp("y_re", y_re, (a_re - tr) / 2.0);
      cmp("y_im", y_im, (a_im - ti) / 2.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
