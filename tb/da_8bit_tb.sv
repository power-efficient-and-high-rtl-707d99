// da_8bit_tb: both filters with 8-bit data, coefficients and weights.
//
// The fixed filter runs with 8-bit input and coefficients (Q1.7), the default
// low-pass coefficients rounded to 8 bits (c8[n] = round(c[n] / 256), which
// still sum to 128, unity DC gain). The adaptive filter runs with 8-bit
// samples and weights and a step size of 1/4: with 8-bit weights, the default
// 1/64 would make most block updates round to zero.
//
// Both are compared bit for bit with multiply-based reference models:
//   fixed filter: impulse response, random input, and a worst-case pattern
//     that saturates the output;
//   adaptive filter: every y_full, y, e and e_sat, and all weights after
//     every block, during system identification of a random 16-tap FIR
//     (the error must shrink at least 2x), then an overload that saturates
//     weights, y and e.
// Timing: outputs 9 cycles after their sample (8 serial bits plus one), fixed
// filter samples 10 cycles apart, adaptive filter samples 10 cycles apart,
// 8 more after every fourth sample and one more after a block's last.
module da_8bit_tb;
  localparam int N = 16, L = 16, B = 8, MU = 2, FR = B - 1;
  localparam int C8 [N] = '{0, 1, 1, -2, -7, 0, 24, 47, 47, 24, 0, -7, -2, 1, 1, 0};

  logic clk = 0, rst_n = 0;
  // fixed filter
  logic f_valid = 0, f_read, f_ovalid;
  logic signed [B-1:0] f_data = 0, f_y;
  logic signed [B+B+$clog2(N)-1:0] f_full;
  // adaptive filter
  logic a_valid = 0, a_read, a_ovalid, a_esat, a_upd;
  logic signed [B-1:0] a_data = 0, a_des = 0, a_y, a_e;
  logic signed [B+B+$clog2(N)-1:0] a_full;
  logic signed [B-1:0] a_w [N];

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_fsat = 0, n_updates = 0, n_grad = 0, n_esat = 0, n_ysat = 0, n_wsat = 0;

  da_fir #(.XW(B), .CW(B), .COEFS(C8)) u_fir (
    .clk, .rst_n, .in_valid(f_valid), .in_data(f_data), .read(f_read),
    .out_valid(f_ovalid), .y_out(f_y), .y_full(f_full));

  da_blms_filter #(.XW(B), .WW(B), .MU_SHIFT(MU)) u_blms (
    .clk, .rst_n, .in_valid(a_valid), .in_data(a_data), .in_desired(a_des),
    .read(a_read), .out_valid(a_ovalid), .y_out(a_y), .y_full(a_full),
    .e_out(a_e), .e_sat(a_esat), .block_update(a_upd), .weights(a_w));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && a_upd) n_updates++;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat8(longint v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------- fixed filter ----------------
  longint fhist [N];
  longint f_last = -1;

  task automatic fir_sample(longint x);
    longint yf, ys, acc_cyc;
    int lat;
    @(negedge clk);
    f_data = B'(x);
    f_valid = 1;
    while (!f_read) @(negedge clk);
    acc_cyc = cyc;
    @(negedge clk);
    f_valid = 0;
    f_data = B'($urandom);
    if (f_last >= 0) chk(acc_cyc - f_last == B + 2, $sformatf("fir spacing %0d", acc_cyc - f_last));
    f_last = acc_cyc;
    for (int n = N - 1; n > 0; n--) fhist[n] = fhist[n-1];
    fhist[0] = x;
    yf = 0;
    for (int n = 0; n < N; n++) yf += longint'(C8[n]) * fhist[n];
    ys = sat8(yf >>> FR);
    if (ys != (yf >>> FR)) n_fsat++;
    lat = 1;
    while (!f_ovalid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    chk(lat == B + 1, $sformatf("fir latency %0d", lat));
    chk(longint'(f_full) == yf && longint'(f_y) == ys,
        $sformatf("fir y_full=%0d/%0d y=%0d/%0d", f_full, yf, f_y, ys));
  endtask

  // ---------------- adaptive filter ----------------
  longint rtaps [N], rw [N], rgrad [N];
  int rcount = 0;
  longint a_last = -1, exp_gap = 0;
  bit cmp_pending = 0;

  task automatic compare_weights();
    for (int n = 0; n < N; n++)
      chk(longint'(a_w[n]) == rw[n], $sformatf("w[%0d]=%0d exp=%0d", n, a_w[n], rw[n]));
  endtask

  task automatic blms_sample(longint x, longint d, output longint abs_e);
    longint yf, ys, es, acc_cyc;
    int lat;
    @(negedge clk);
    a_data = B'(x);
    a_des = B'(d);
    a_valid = 1;
    while (!a_read) @(negedge clk);
    acc_cyc = cyc;
    if (cmp_pending) begin
      compare_weights();
      cmp_pending = 0;
    end
    @(negedge clk);
    a_valid = 0;
    a_data = B'($urandom);
    a_des = B'($urandom);
    if (a_last >= 0)
      chk(acc_cyc - a_last == exp_gap, $sformatf("blms spacing %0d, exp %0d", acc_cyc - a_last, exp_gap));
    a_last = acc_cyc;
    for (int n = N - 1; n > 0; n--) rtaps[n] = rtaps[n-1];
    rtaps[0] = x;
    yf = 0;
    for (int n = 0; n < N; n++) yf += rw[n] * rtaps[n];
    ys = sat8(yf >>> FR);
    es = sat8(d - ys);
    if (ys != (yf >>> FR)) n_ysat++;
    for (int n = 0; n < N; n++) rgrad[n] += es * rtaps[n];
    lat = 1;
    while (!a_ovalid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    chk(lat == B + 1, $sformatf("blms latency %0d", lat));
    chk(longint'(a_full) == yf && longint'(a_y) == ys && longint'(a_e) == es,
        $sformatf("blms y_full=%0d/%0d y=%0d/%0d e=%0d/%0d", a_full, yf, a_y, ys, a_e, es));
    chk(a_esat == (es != d - ys), "e_sat flag");
    if (a_esat) n_esat++;
    abs_e = es < 0 ? -es : es;
    exp_gap = B + 2;
    if (rcount % 4 == 3) begin
      exp_gap += B;
      n_grad++;
    end
    rcount++;
    if (rcount == L) begin
      for (int n = 0; n < N; n++) begin
        longint v;
        v = rw[n] + (rgrad[n] >>> (B + B - B - 1 + MU));
        if (v != sat8(v)) n_wsat++;
        rw[n] = sat8(v);
        rgrad[n] = 0;
      end
      rcount = 0;
      exp_gap += 1;
      cmp_pending = 1;
    end
  endtask

  initial begin
    longint plant [N], hist [N], ae, err_first, err_last;
    for (int n = 0; n < N; n++) begin
      fhist[n] = 0; rtaps[n] = 0; rw[n] = 0; rgrad[n] = 0; hist[n] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // fixed filter: impulse, random input, worst case
    for (int k = 0; k < N; k++) begin
      fir_sample(k == 0 ? 1 : 0);
      chk(longint'(f_full) == C8[k], $sformatf("fir impulse %0d: %0d exp %0d", k, f_full, C8[k]));
    end
    for (int s = 0; s < 400; s++) fir_sample(longint'($urandom_range(0, 255)) - 128);
    for (int s = 0; s < 2 * N; s++) begin
      int k;
      k = N - 1 - (s % N);
      fir_sample(C8[k] >= 0 ? 127 : -128);
    end

    // adaptive filter: system identification
    for (int n = 0; n < N; n++) plant[n] = longint'($urandom_range(0, 32)) - 16;
    err_first = 0;
    err_last = 0;
    for (int b = 0; b < 60; b++) begin
      for (int i = 0; i < L; i++) begin
        longint x, d;
        x = longint'($urandom_range(0, 127)) - 64;
        for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
        hist[0] = x;
        d = 0;
        for (int n = 0; n < N; n++) d += plant[n] * hist[n];
        d = sat8(d >>> FR);
        blms_sample(x, d, ae);
        if (b < 2) err_first += ae;
        if (b >= 58) err_last += ae;
      end
    end
    $display("8-bit adaptive mean |e|: first two blocks %0d/32, last two blocks %0d/32", err_first, err_last);
    chk(err_last * 2 < err_first, "error did not shrink by 2x during adaptation");
    // overload: full-scale input and desired value saturate the weights; then
    // opposite signs saturate y and e
    for (int s = 0; s < 4 * L; s++) blms_sample(127, 127, ae);
    for (int s = 0; s < L; s++) blms_sample(127, -128, ae);

    repeat (3 * B) @(negedge clk);
    if (cmp_pending) compare_weights();
    $display("mechanisms: fir saturations=%0d block updates=%0d gradient passes=%0d e_sat=%0d y_sat=%0d w_sat=%0d",
             n_fsat, n_updates, n_grad, n_esat, n_ysat, n_wsat);
    chk(n_fsat > 0, "no fixed-filter saturation");
    chk(n_updates == 65 && n_grad == 4 * 65, "block update / gradient pass count");
    chk(n_wsat > 0, "no weight saturation");
    chk(n_ysat > 0, "no output saturation");
    chk(n_esat > 0, "no error saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
