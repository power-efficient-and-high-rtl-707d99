// da_lut_rom_tb: checks all sixteen words of constant DA tables built from
// several coefficient sets, including extreme values, against subset sums
// formed here.
module da_lut_rom_tb;
  localparam int C0 [4] = '{0, 183, 259, -541};
  localparam int C1 [4] = '{32767, 32767, 32767, 32767};
  localparam int C2 [4] = '{-32768, 1, -2, 12124};
  logic [3:0] addr;
  logic signed [17:0] w0, w1, w2;
  int checks = 0, failures = 0;

  da_lut_rom #(.CW(16), .COEF(C0)) u0 (.addr, .word(w0));
  da_lut_rom #(.CW(16), .COEF(C1)) u1 (.addr, .word(w1));
  da_lut_rom #(.CW(16), .COEF(C2)) u2 (.addr, .word(w2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int subset(int c [4], int a);
    int s = 0;
    for (int j = 0; j < 4; j++) if ((a >> j) & 1) s += c[j];
    return s;
  endfunction

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks += 3;
      if (int'(w0) != subset(C0, a)) begin failures++; $display("FAIL C0 a=%0d %0d", a, w0); end
      if (int'(w1) != subset(C1, a)) begin failures++; $display("FAIL C1 a=%0d %0d", a, w1); end
      if (int'(w2) != subset(C2, a)) begin failures++; $display("FAIL C2 a=%0d %0d", a, w2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
