// tb_ifft_ram: random writes and reads against an array model; a read of
// the address being written must return the old word until the clock edge.
module tb_ifft_ram;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, we = 0;
  logic [1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [DEPTH];
  bit   known [DEPTH];
  int checks = 0, failures = 0;

  ifft_ram #(.W(W), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we    = (i < 8) ? 1'b1 : 1'($urandom);
      waddr = (i < 8) ? 2'(i) : 2'($urandom);
      wdata = W'($urandom);
      raddr = (i % 5 == 0) ? waddr : 2'($urandom);
      #1;
      if (known[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) begin failures++; $display("addr %0d got %h want %h", raddr, rdata, model[raddr]); end
      end
      @(posedge clk);
      if (we) begin model[waddr] = wdata; known[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
