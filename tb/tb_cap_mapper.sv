// tb_cap_mapper: checks all 16 indices against the constellation table.
module tb_cap_mapper;
  import cap_pkg::*;
  import cap_ref_pkg::*;
  sym_idx_t idx;
  sym_t     sym;
  int checks = 0, failures = 0;

  cap_mapper dut (.idx, .sym);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      idx = 4'(i);
      #1;
      checks += 2;
      if (int'(sym.a) != REF_A[i]) begin failures++; $display("idx %0d a=%0d want %0d", i, sym.a, REF_A[i]); end
      if (int'(sym.b) != REF_B[i]) begin failures++; $display("idx %0d b=%0d want %0d", i, sym.b, REF_B[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
