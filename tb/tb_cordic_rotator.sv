// tb_cordic_rotator: rotates random vectors by random angles (and by the
// quadrant boundaries) and compares with floating-point rotation; the
// error must stay within 2 LSB.
module tb_cordic_rotator;
  localparam int W = 16, AW = 16;
  logic signed [W-1:0]  x_i, y_i;
  logic signed [AW-1:0] ang;
  logic signed [W:0]    x_o, y_o;
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  cordic_rotator #(.W(W), .ANG_W(AW)) dut (.x_i, .y_i, .ang, .x_o, .y_o);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int x, int y, int a);
    real th, ex, ey, e;
    x_i = W'(x); y_i = W'(y); ang = AW'(a);
    #1;
    th = 2.0 * 3.141592653589793 * real'(ang) / 65536.0;
    ex = x * $cos(th) - y * $sin(th);
    ey = x * $sin(th) + y * $cos(th);
    e = (real'(x_o) - ex) ** 2 + (real'(y_o) - ey) ** 2;
    e = $sqrt(e);
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > 2.0) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d) ang %0d: got (%0d,%0d) want (%f,%f)", x, y, a, x_o, y_o, ex, ey);
    end
  endtask

  initial begin
    int edges [8] = '{0, 8192, 16383, 16384, 16385, 32767, -32768, -16384};
    foreach (edges[i]) begin
      check(20000, -7000, edges[i]);
      check(-32768, 32767, edges[i]);
    end
    for (int i = 0; i < 3000; i++)
      check($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768);
    $display("max error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
