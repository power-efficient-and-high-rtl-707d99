// mux_array_tb: fills the LUTs with random words and checks that every group
// returns the word at its own address.
module mux_array_tb;
  localparam int N = 16, LW = 18, G = N;
  logic signed [LW-1:0] lut  [G][16];
  logic        [3:0]    addr [G];
  logic signed [LW-1:0] word [G];
  int checks = 0, failures = 0;

  mux_array #(.NPORT(N), .LW(LW)) dut (.lut, .addr, .word);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int g = 0; g < G; g++) begin
        for (int a = 0; a < 16; a++) lut[g][a] = LW'($urandom);
        addr[g] = 4'($urandom);
      end
      #1;
      for (int g = 0; g < G; g++) begin
        checks++;
        if (word[g] != lut[g][addr[g]]) begin
          failures++;
          $display("FAIL g=%0d addr=%0d got=%0d exp=%0d", g, addr[g], word[g], lut[g][addr[g]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
