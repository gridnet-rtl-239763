// tb_bypass_gate: exhaustive check of the by-pass gate.
module tb_bypass_gate;
  logic power_good;
  logic [3:0] fail, fail_en;
  logic actuate;
  int checks = 0, failures = 0;

  bypass_gate #(.NCOND(4)) dut (.*);

  initial begin
    for (int p = 0; p < 2; p++)
      for (int f = 0; f < 16; f++)
        for (int e = 0; e < 16; e++) begin
          bit exp;
          power_good = 1'(p); fail = 4'(f); fail_en = 4'(e);
          #1;
          exp = (p == 1);
          for (int b = 0; b < 4; b++) if (f[b] && e[b]) exp = 0;
          checks++;
          if (actuate !== exp) begin
            failures++;
            $display("FAIL: p=%0d fail=%h en=%h actuate=%b", p, f, e, actuate);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
