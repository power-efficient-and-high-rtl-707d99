// weight_update_tb: drives the weight update as the controller does, with a
// behavioural table bank (word[k] = sum_j addr[k][j] * x(t-k-j), computed
// here from the sample history), and compares the weights after each block
// with a block-LMS model written with multiplications:
// w[n] += sat((sum_i e(i)*x(i-n)) >>> 21). Also checks the output-phase
// addresses (weight bits on ports 0, 4, 8, 12 and zero elsewhere), that
// weights only change on `apply`, and the `updated` pulse. Random errors,
// then errors equal to full-scale inputs, which drive w[0] into saturation.
module weight_update_tb;
  localparam int N = 16, XW = 16, WW = 16, LW = 18, FRAC = 15, MU = 6, L = 16, H = N + 3;
  logic clk = 0, rst_n = 0;
  logic conv_en = 0, corr_en = 0, e_we = 0, apply = 0;
  logic [3:0] bit_sel = 0;
  logic [1:0] e_idx = 0;
  logic signed [XW-1:0] e = 0;
  logic signed [LW-1:0] word [N];
  logic [3:0] addr [N];
  logic signed [WW-1:0] weights [N];
  logic updated;
  longint hist [H], ref_w [N], grad [N];
  int checks = 0, failures = 0, n_wsat = 0;

  weight_update #(.N_TAPS(N), .XW(XW), .WW(WW), .LW(LW), .GW(36), .FRAC(FRAC), .MU_SHIFT(MU)) dut (
    .clk, .rst_n, .conv_en, .corr_en, .bit_sel, .e_we, .e_idx, .e, .apply, .word, .addr,
    .weights, .updated);

  always #5 clk = ~clk;

  // behavioural table bank: port k reads the window of age k
  task automatic drive_words();
    for (int k = 0; k < N; k++) begin
      longint s;
      s = 0;
      for (int j = 0; j < 4; j++) if (addr[k][j]) s += hist[k+j];
      word[k] = LW'(s);
    end
  endtask

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

  task automatic run_block(int emax, bit tied = 0);
    for (int i = 0; i < L; i++) begin
      longint ev;
      // new sample
      for (int k = H - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = tied ? ($urandom_range(0, 1) ? 32767 : -32767)
                     : longint'($urandom_range(0, 65535)) - 32768;
      // output phase: check the weight-bit addresses
      for (int b = 0; b < WW; b++) begin
        @(negedge clk);
        conv_en = 1;
        bit_sel = 4'(b);
        #1;
        for (int k = 0; k < N; k++) begin
          logic [3:0] exp;
          for (int j = 0; j < 4; j++) exp[j] = (k % 4 == 0) ? weights[k+j][b] : 1'b0;
          chk(addr[k] == exp, $sformatf("output-phase address port %0d bit %0d", k, b));
        end
      end
      @(negedge clk);
      conv_en = 0;
      ev = tied ? hist[0] : longint'($urandom_range(0, 2 * emax)) - emax;
      e = XW'(ev);
      e_we = 1;
      e_idx = 2'(i % 4);
      for (int n = 0; n < N; n++) grad[n] += ev * hist[n];
      @(negedge clk);
      e_we = 0;
      e = XW'($urandom);
      if (i % 4 == 3) begin
        for (int b = 0; b < XW; b++) begin
          corr_en = 1;
          bit_sel = 4'(b);
          #1 drive_words();
          @(negedge clk);
        end
        corr_en = 0;
      end
      for (int n = 0; n < N; n++)
        chk(longint'(weights[n]) == ref_w[n], $sformatf("w[%0d] changed before apply", n));
    end
    apply = 1;
    @(negedge clk);
    apply = 0;
    chk(updated, "updated pulse missing");
    for (int n = 0; n < N; n++) begin
      longint v = ref_w[n] + (grad[n] >>> (FRAC + MU));
      ref_w[n] = v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
      if (ref_w[n] != v) n_wsat++;
      grad[n] = 0;
      chk(longint'(weights[n]) == ref_w[n], $sformatf("w[%0d]=%0d exp %0d", n, weights[n], ref_w[n]));
    end
    @(negedge clk);
    chk(!updated, "updated longer than one cycle");
  endtask

  initial begin
    for (int k = 0; k < H; k++) hist[k] = 0;
    for (int k = 0; k < N; k++) word[k] = '0;
    for (int n = 0; n < N; n++) begin ref_w[n] = 0; grad[n] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) run_block(2000);
    for (int k = 0; k < 3; k++) run_block(32768);
    for (int k = 0; k < 6; k++) run_block(0, 1);   // error equal to the input: w[0] grows to saturation
    $display("saturated weight updates=%0d", n_wsat);
    chk(n_wsat > 0, "no weight saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
