// shift_register_tb: shifts random samples into the delay line and checks the
// taps (x(k-n)) against a model line, that the line holds without shift_en,
// and every bit-serial LUT address for all bit positions.
module shift_register_tb;
  localparam int N = 16, XW = 16, G = N / 4;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic signed [XW-1:0] x_in;
  logic [3:0] bit_sel;
  logic signed [XW-1:0] taps [N];
  logic [3:0] addr [G];
  logic signed [XW-1:0] model [N];
  int checks = 0, failures = 0;

  shift_register #(.N_TAPS(N), .XW(XW)) dut (.clk, .rst_n, .shift_en, .x_in, .bit_sel, .taps, .addr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int n = 0; n < N; n++) begin
      checks++;
      if (taps[n] != model[n]) begin
        failures++;
        $display("FAIL tap %0d got=%0d exp=%0d", n, taps[n], model[n]);
      end
    end
    for (int b = 0; b < XW; b++) begin
      bit_sel = 4'(b);
      #1;
      for (int g = 0; g < G; g++) begin
        logic [3:0] exp;
        for (int j = 0; j < 4; j++) exp[j] = model[4*g+j][b];
        checks++;
        if (addr[g] != exp) begin
          failures++;
          $display("FAIL addr g=%0d bit=%0d got=%b exp=%b", g, b, addr[g], exp);
        end
      end
    end
  endtask

  initial begin
    bit_sel = 0;
    x_in = 0;
    for (int n = 0; n < N; n++) model[n] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      shift_en = ($urandom_range(0, 3) != 0);
      x_in = XW'($urandom);
      @(posedge clk); #1;
      if (shift_en) begin
        for (int n = N - 1; n > 0; n--) model[n] = model[n-1];
        model[0] = x_in;
      end
      shift_en = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
