// da_accumulator_tb: feeds XW bit-serial partial sums, as a 16-bit DA filter
// produces them, and checks the full sum (sign-bit term subtracted), the
// scaled and saturated Q1.15 output, and that `done` pulses exactly one cycle
// after the last bit.
module da_accumulator_tb;
  localparam int XW = 16, TW = 20, ACC_W = 36, FRAC = 15;
  logic clk = 0, rst_n = 0, start = 0, en = 0, last = 0;
  logic [3:0] bit_idx = 0;
  logic signed [TW-1:0] tsum = 0;
  logic done;
  logic signed [ACC_W-1:0] acc_full;
  logic signed [XW-1:0] y_out;
  int checks = 0, failures = 0;

  da_accumulator #(.XW(XW), .TW(TW), .ACC_W(ACC_W), .FRAC(FRAC)) dut (
    .clk, .rst_n, .start, .en, .last, .bit_idx, .tsum, .done, .acc_full, .y_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      longint exp, ys;
      int scale;
      scale = (t % 3 == 0) ? 19 : 14;   // large sums exercise saturation
      exp = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int b = 0; b < XW; b++) begin
        en = 1;
        bit_idx = 4'(b);
        last = (b == XW - 1);
        tsum = TW'($signed($urandom_range(0, (1 << (scale + 1)) - 1)) - (1 << scale));
        if (b == XW - 1) exp -= longint'(tsum) <<< b;
        else             exp += longint'(tsum) <<< b;
        @(negedge clk);
        checks++;
        if (done != (b == XW - 1)) begin
          failures++;
          $display("FAIL done=%0b after bit %0d", done, b);
        end
      end
      en = 0;
      last = 0;
      ys = exp >>> FRAC;
      if (ys > 32767) ys = 32767;
      if (ys < -32768) ys = -32768;
      checks++;
      if (longint'(acc_full) != exp || longint'(y_out) != ys) begin
        failures++;
        $display("FAIL acc=%0d exp=%0d y=%0d exp_y=%0d", acc_full, exp, y_out, ys);
      end
      @(posedge clk); #1;
      checks++;
      if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
