// lut_update_tb: shifts random samples (full-scale extremes included) into
// the table bank and checks every word of every table against sums formed
// here from the sample history: lut[k][a] = sum_j a[j]*x(t-k-j), t the
// newest sample. Also checks that the bank holds without shift_en and that
// reset leaves it (and the history) at zero.
module lut_update_tb;
  localparam int NW = 16, XW = 16, LW = 18, H = NW + 3;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic signed [XW-1:0] x_in = 0;
  logic signed [LW-1:0] lut [NW][16];
  longint hist [H];     // hist[0] = newest sample
  int checks = 0, failures = 0;

  lut_update #(.NWIN(NW), .XW(XW), .LW(LW)) dut (.clk, .rst_n, .shift_en, .x_in, .lut);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < NW; k++)
      for (int a = 0; a < 16; a++) begin
        longint exp = 0;
        for (int j = 0; j < 4; j++) if ((a >> j) & 1) exp += hist[k+j];
        checks++;
        if (longint'(lut[k][a]) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL table %0d word %0d: %0d exp %0d", k, a, lut[k][a], exp);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < H; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 120; t++) begin
      shift_en = (t % 5 != 4);
      case (t % 11)
        0: x_in = -16'sd32768;
        1: x_in = 16'sd32767;
        default: x_in = XW'($urandom);
      endcase
      @(negedge clk);
      if (shift_en) begin
        for (int i = H - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = x_in;
      end
      shift_en = 0;
      x_in = XW'($urandom);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
