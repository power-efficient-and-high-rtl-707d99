// da_top_tb: end-to-end test of the whole design at its default parameters:
// the adaptive DA block-LMS filter and the fixed DA FIR filter, run at the
// same time, each against its own reference model written with ordinary
// multiplications.
//
// Adaptive filter: system identification of an unknown 16-tap FIR (the
// error must shrink at least 5x), then an overload that drives weights, y and
// e into saturation. Every output, and the weights after every block, must
// match the block-LMS model bit for bit; every output must come WW+1 cycles
// after its sample. Fixed filter: impulse response (must equal the
// coefficients), random samples and a worst-case pattern that saturates the
// output. Mechanisms counted, each of which must occur: block updates,
// gradient passes, input stalls, saturation of e, y, weights, FIR output.
module da_top_tb;
  import blms_pkg::*;
  localparam int N = N_TAPS, L = BLOCK_L, MU = MU_SHIFT_DEF, AW = XW + WW + $clog2(N_TAPS);
  localparam int C [N] = '{0, 183, 259, -541, -1665, 0, 6025, 12124,
                           12124, 6025, 0, -1665, -541, 259, 183, 0};

  logic clk = 0, rst_n = 0;
  logic b_valid = 0, f_valid = 0;
  logic signed [XW-1:0] b_data = 0, b_desired = 0, f_data = 0;
  logic b_read, b_out_valid, b_e_sat, b_update, f_read, f_out_valid;
  logic signed [XW-1:0] b_y, b_e, f_y;
  logic signed [AW-1:0] b_y_full, f_y_full;
  logic signed [WW-1:0] b_w [N];

  longint rtaps [N], rw [N], rgrad [N], fhist [N];
  int rcount = 0;
  int checks = 0, failures = 0;
  bit cmp_pending = 0;
  int n_updates = 0, n_grad = 0, n_stall = 0, n_esat = 0, n_ysat = 0, n_wsat = 0, n_fsat = 0;

  da_top dut (
    .clk, .rst_n,
    .blms_in_valid(b_valid), .blms_in_data(b_data), .blms_in_desired(b_desired),
    .blms_read(b_read), .blms_out_valid(b_out_valid), .blms_y_out(b_y),
    .blms_y_full(b_y_full), .blms_e_out(b_e), .blms_e_sat(b_e_sat),
    .blms_block_update(b_update), .blms_weights(b_w),
    .fir_in_valid(f_valid), .fir_in_data(f_data), .fir_read(f_read),
    .fir_out_valid(f_out_valid), .fir_y_out(f_y), .fir_y_full(f_y_full));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && b_update) n_updates++;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
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

  // ---- adaptive filter ----
  task automatic blms_sample(longint x, longint d, output longint abs_e);
    longint yf, ys, es;
    int lat;
    @(negedge clk);
    b_data = XW'(x);
    b_desired = XW'(d);
    b_valid = 1;
    while (!b_read) begin
      n_stall++;
      @(negedge clk);
    end
    if (cmp_pending) begin
      for (int n = 0; n < N; n++)
        chk(longint'(b_w[n]) == rw[n], $sformatf("w[%0d]=%0d exp %0d", n, b_w[n], rw[n]));
      cmp_pending = 0;
    end
    @(negedge clk);
    b_valid = 0;
    b_data = XW'($urandom);
    b_desired = XW'($urandom);
    for (int n = N - 1; n > 0; n--) rtaps[n] = rtaps[n-1];
    rtaps[0] = x;
    yf = 0;
    for (int n = 0; n < N; n++) yf += rw[n] * rtaps[n];
    ys = sat16(yf >>> FRAC);
    es = sat16(d - ys);
    if (ys != (yf >>> FRAC)) n_ysat++;
    if (es != d - ys) n_esat++;
    for (int n = 0; n < N; n++) rgrad[n] += es * rtaps[n];
    lat = 1;
    while (!b_out_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    chk(lat == WW + 1, $sformatf("adaptive latency %0d", lat));
    chk(longint'(b_y_full) == yf && longint'(b_y) == ys && longint'(b_e) == es && b_e_sat == (es != d - ys),
        $sformatf("adaptive y_full=%0d/%0d y=%0d/%0d e=%0d/%0d", b_y_full, yf, b_y, ys, b_e, es));
    abs_e = es < 0 ? -es : es;
    if (rcount % 4 == 3) n_grad++;
    rcount++;
    if (rcount == L) begin
      for (int n = 0; n < N; n++) begin
        longint v = rw[n] + (rgrad[n] >>> (FRAC + MU));
        if (v != sat16(v)) n_wsat++;
        rw[n] = sat16(v);
        rgrad[n] = 0;
      end
      rcount = 0;
      cmp_pending = 1;
    end
  endtask

  task automatic run_blms();
    longint plant [N], hist [N], ae, err_first, err_last;
    for (int n = 0; n < N; n++) begin
      plant[n] = longint'($urandom_range(0, 8000)) - 4000;
      hist[n] = 0;
    end
    err_first = 0;
    err_last = 0;
    for (int b = 0; b < 120; b++)
      for (int i = 0; i < L; i++) begin
        longint x, d;
        x = longint'($urandom_range(0, 32767)) - 16384;
        for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
        hist[0] = x;
        d = 0;
        for (int n = 0; n < N; n++) d += plant[n] * hist[n];
        blms_sample(x, sat16(d >>> FRAC), ae);
        if (b < 2) err_first += ae;
        if (b >= 118) err_last += ae;
      end
    $display("adaptive mean |e|: first two blocks %0d, last two blocks %0d", err_first / (2 * L), err_last / (2 * L));
    chk(err_last * 5 < err_first, "adaptive error did not shrink by 5x");
    for (int s = 0; s < 200 * L; s++) blms_sample(1500, 32767, ae);
    for (int s = 0; s < L; s++) blms_sample(32767, -32768, ae);
    repeat (3 * XW) @(negedge clk);
    if (cmp_pending)
      for (int n = 0; n < N; n++)
        chk(longint'(b_w[n]) == rw[n], $sformatf("final w[%0d]=%0d exp %0d", n, b_w[n], rw[n]));
  endtask

  // ---- fixed filter ----
  task automatic fir_sample(longint x);
    longint yf, ys;
    int lat;
    @(negedge clk);
    f_data = XW'(x);
    f_valid = 1;
    while (!f_read) @(negedge clk);
    @(negedge clk);
    f_valid = 0;
    f_data = XW'($urandom);
    for (int n = N - 1; n > 0; n--) fhist[n] = fhist[n-1];
    fhist[0] = x;
    yf = 0;
    for (int n = 0; n < N; n++) yf += longint'(C[n]) * fhist[n];
    ys = sat16(yf >>> FRAC);
    if (ys != (yf >>> FRAC)) n_fsat++;
    lat = 1;
    while (!f_out_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    chk(lat == XW + 1, $sformatf("fixed latency %0d", lat));
    chk(longint'(f_y_full) == yf && longint'(f_y) == ys, $sformatf("fixed y_full=%0d/%0d", f_y_full, yf));
  endtask

  task automatic run_fir();
    for (int n = 0; n < N; n++) fhist[n] = 0;
    for (int k = 0; k < N; k++) begin
      fir_sample(k == 0 ? 1 : 0);
      chk(longint'(f_y_full) == C[k], $sformatf("impulse response %0d", k));
    end
    for (int s = 0; s < 2000; s++) fir_sample(longint'($urandom_range(0, 65535)) - 32768);
    for (int s = 0; s < 2 * N; s++) begin
      int k;
      k = N - 1 - (s % N);
      fir_sample(C[k] >= 0 ? 32767 : -32768);
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin rtaps[n] = 0; rw[n] = 0; rgrad[n] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    fork
      run_blms();
      run_fir();
    join
    $display("mechanisms: block updates=%0d gradient passes=%0d stall cycles=%0d e_sat=%0d y_sat=%0d w_sat=%0d fir_sat=%0d",
             n_updates, n_grad, n_stall, n_esat, n_ysat, n_wsat, n_fsat);
    chk(n_updates == 321 && n_grad == 4 * 321, "block update / gradient pass count");
    chk(n_stall > 0, "no input stall happened");
    chk(n_esat > 0, "no error saturation happened");
    chk(n_ysat > 0, "no adaptive output saturation happened");
    chk(n_wsat > 0, "no weight saturation happened");
    chk(n_fsat > 0, "no fixed filter saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
