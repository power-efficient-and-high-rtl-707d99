// da_fir_tb: end-to-end test of the fixed-coefficient DA FIR filter at its
// default size and coefficients.
//
// The reference is the direct-form sum y_full = sum c[n]*x(k-n) with the
// default coefficients, y = sat16(y_full >>> 15). Stimulus: an impulse of
// height 1 (the output must replay the coefficients in order), random
// full-range samples, and a worst-case pattern (input signs matching the
// coefficient signs) that saturates y. Timing: every output XW+1 cycles after
// its sample, samples XW+2 cycles apart when the source is always ready,
// and idle gaps from the source are tolerated.
module da_fir_tb;
  localparam int N = 16, XW = 16;
  localparam int C [N] = '{0, 183, 259, -541, -1665, 0, 6025, 12124,
                           12124, 6025, 0, -1665, -541, 259, 183, 0};
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [XW-1:0] in_data = 0;
  logic read, out_valid;
  logic signed [XW-1:0] y_out;
  logic signed [XW+XW+$clog2(N)-1:0] y_full;
  longint hist [N];
  longint cyc = 0, last_acc = -1;
  int checks = 0, failures = 0, n_sat = 0, n_gap = 0;

  da_fir dut (.clk, .rst_n, .in_valid, .in_data, .read, .out_valid, .y_out, .y_full);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic do_sample(longint x, int gap);
    longint yf, ys, acc_cyc;
    int lat;
    repeat (gap) @(negedge clk);
    if (gap > 0) n_gap++;
    @(negedge clk);
    in_data = XW'(x);
    in_valid = 1;
    while (!read) @(negedge clk);
    acc_cyc = cyc;
    @(negedge clk);
    in_valid = 0;
    in_data = XW'($urandom);
    if (last_acc >= 0)
      chk(gap == 0 ? acc_cyc - last_acc == XW + 2 : acc_cyc - last_acc > XW + 2,
          $sformatf("sample spacing %0d", acc_cyc - last_acc));
    last_acc = acc_cyc;
    for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
    hist[0] = x;
    yf = 0;
    for (int n = 0; n < N; n++) yf += longint'(C[n]) * hist[n];
    ys = yf >>> 15;
    if (ys > 32767) begin ys = 32767; n_sat++; end
    if (ys < -32768) begin ys = -32768; n_sat++; end
    lat = 1;
    while (!out_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    chk(lat == XW + 1, $sformatf("latency %0d", lat));
    chk(longint'(y_full) == yf && longint'(y_out) == ys,
        $sformatf("y_full=%0d exp=%0d y=%0d exp=%0d", y_full, yf, y_out, ys));
  endtask

  initial begin
    for (int n = 0; n < N; n++) hist[n] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // impulse: the output replays the coefficients
    for (int k = 0; k < N; k++) begin
      do_sample(k == 0 ? 1 : 0, 0);
      chk(longint'(y_full) == C[k], $sformatf("impulse response %0d: %0d exp %0d", k, y_full, C[k]));
    end
    for (int s = 0; s < 500; s++) do_sample(longint'($urandom_range(0, 65535)) - 32768, (s % 7 == 3) ? 2 : 0);
    // worst case: signs matching the coefficients
    for (int s = 0; s < 2 * N; s++) begin
      int k;
      k = N - 1 - (s % N);
      do_sample(C[k] >= 0 ? 32767 : -32768, 0);
    end
    $display("mechanisms: saturated outputs=%0d source gaps=%0d", n_sat, n_gap);
    chk(n_sat > 0, "no output saturation happened");
    chk(n_gap > 0, "no idle gap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
