// da_blms_filter_tb: end-to-end test of the adaptive DA block-LMS filter at
// its default size (16 taps, block of 16, 16-bit data and weights).
//
// A reference model written with ordinary multiplications runs beside the
// filter; every output (full sum, y, e, saturation flag) and, after every
// block, every weight must match it bit for bit. Phases:
//   1. system identification: the desired signal is an unknown 16-tap FIR
//      applied to random input; the error must shrink at least 5x;
//   2. overload: inputs and desired values that drive the weights, y and e
//      into saturation.
// Timing: each output comes WW+1 cycles after its sample is taken; samples
// are WW+2 cycles apart, XW more after every fourth sample (gradient phase)
// and one more after a block's last (weight update). Each mechanism is
// counted and must occur.
module da_blms_filter_tb;
  import blms_pkg::*;
  localparam int N = N_TAPS, L = BLOCK_L, MU = MU_SHIFT_DEF;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [XW-1:0] in_data = 0, in_desired = 0;
  logic read, out_valid, e_sat, block_update;
  logic signed [XW-1:0] y_out, e_out;
  logic signed [XW+WW+$clog2(N)-1:0] y_full;
  logic signed [WW-1:0] weights [N];

  longint rtaps [N], rw [N], rgrad [N];
  int rcount;
  int checks = 0, failures = 0;
  longint cyc = 0, last_acc = -1, exp_gap = 0;
  bit cmp_pending = 0;
  int n_updates = 0, n_grad = 0, n_esat = 0, n_ysat = 0, n_wsat = 0, n_stall = 0;

  da_blms_filter dut (
    .clk, .rst_n, .in_valid, .in_data, .in_desired, .read,
    .out_valid, .y_out, .y_full, .e_out, .e_sat, .block_update, .weights);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && block_update) n_updates++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat16(longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic compare_weights(string what);
    for (int n = 0; n < N; n++)
      chk(longint'(weights[n]) == rw[n], $sformatf("%s w[%0d]=%0d exp=%0d", what, n, weights[n], rw[n]));
  endtask

  // Send one sample and check its output; returns |e|.
  task automatic do_sample(longint x, longint d, output longint abs_e);
    longint yf, ys, es, acc_cyc;
    int lat;
    @(negedge clk);
    in_data = XW'(x);
    in_desired = XW'(d);
    in_valid = 1;
    while (!read) begin
      n_stall++;
      @(negedge clk);
    end
    acc_cyc = cyc;
    if (cmp_pending) begin
      compare_weights("after block");
      cmp_pending = 0;
    end
    @(negedge clk);
    in_valid = 0;
    in_data = XW'($urandom);      // inputs are only valid with the handshake
    in_desired = XW'($urandom);
    if (last_acc >= 0)
      chk(acc_cyc - last_acc == exp_gap, $sformatf("sample spacing %0d, exp %0d", acc_cyc - last_acc, exp_gap));
    last_acc = acc_cyc;
    // reference model
    for (int n = N - 1; n > 0; n--) rtaps[n] = rtaps[n-1];
    rtaps[0] = x;
    yf = 0;
    for (int n = 0; n < N; n++) yf += rw[n] * rtaps[n];
    ys = sat16(yf >>> FRAC);
    es = sat16(d - ys);
    if (ys != (yf >>> FRAC)) n_ysat++;
    for (int n = 0; n < N; n++) rgrad[n] += es * rtaps[n];
    // output
    lat = 1;
    while (!out_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    chk(lat == WW + 1, $sformatf("latency %0d, exp %0d", lat, WW + 1));
    chk(longint'(y_full) == yf && longint'(y_out) == ys && longint'(e_out) == es,
        $sformatf("y_full=%0d/%0d y=%0d/%0d e=%0d/%0d", y_full, yf, y_out, ys, e_out, es));
    chk(e_sat == (es != d - ys), "e_sat flag");
    if (e_sat) n_esat++;
    abs_e = es < 0 ? -es : es;
    exp_gap = WW + 2;
    if (rcount % 4 == 3) begin
      exp_gap += XW;
      n_grad++;
    end
    rcount++;
    if (rcount == L) begin
      for (int n = 0; n < N; n++) begin
        longint v = rw[n] + (rgrad[n] >>> (FRAC + MU));
        if (v != sat16(v)) n_wsat++;
        rw[n] = sat16(v);
        rgrad[n] = 0;
      end
      rcount = 0;
      exp_gap += 1;
      cmp_pending = 1;
    end
  endtask

  initial begin
    longint plant [N], hist [N], ae, err_first, err_last;
    for (int n = 0; n < N; n++) begin rtaps[n] = 0; rw[n] = 0; rgrad[n] = 0; hist[n] = 0; end
    rcount = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // 1. system identification
    for (int n = 0; n < N; n++) plant[n] = longint'($urandom_range(0, 8000)) - 4000;
    err_first = 0;
    err_last = 0;
    for (int b = 0; b < 120; b++) begin
      for (int i = 0; i < L; i++) begin
        longint x, d;
        x = longint'($urandom_range(0, 32767)) - 16384;
        for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
        hist[0] = x;
        d = 0;
        for (int n = 0; n < N; n++) d += plant[n] * hist[n];
        d = sat16(d >>> FRAC);
        do_sample(x, d, ae);
        if (b < 2) err_first += ae;
        if (b >= 118) err_last += ae;
      end
    end
    $display("mean |e|: first two blocks %0d, last two blocks %0d", err_first / (2 * L), err_last / (2 * L));
    chk(err_last * 5 < err_first, "error did not shrink by 5x during adaptation");

    // 2. overload: a small constant input with a full-scale desired value
    //    needs a gain above 16, so the weights run into saturation; then a
    //    full-scale input saturates y and e.
    for (int s = 0; s < 200 * L; s++) do_sample(1500, 32767, ae);
    chk(n_wsat > 0, "no weight saturation happened");
    for (int s = 0; s < L; s++) do_sample(32767, -32768, ae);

    repeat (3 * XW) @(negedge clk);
    if (cmp_pending) compare_weights("final");
    $display("mechanisms: block updates=%0d gradient passes=%0d stall cycles=%0d e_sat=%0d y_sat=%0d w_sat=%0d",
             n_updates, n_grad, n_stall, n_esat, n_ysat, n_wsat);
    chk(n_updates == 321, "block update count");
    chk(n_grad == 4 * 321, "gradient pass count");
    chk(n_stall > 0, "no stall happened");
    chk(n_esat > 0, "no error saturation happened");
    chk(n_ysat > 0, "no output saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
