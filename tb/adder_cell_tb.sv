// adder_cell_tb: checks every address of the DA LUT word cell against an
// independently formed subset sum, for random and extreme weights.
module adder_cell_tb;
  localparam int WW = 16;
  logic signed [WW-1:0] m, n, o, p;
  logic [3:0] addr;
  logic signed [WW+1:0] sum;
  int checks = 0, failures = 0;

  adder_cell #(.WW(WW)) dut (.m, .n, .o, .p, .addr, .sum);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    int exp;
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      exp = (a & 1 ? int'(m) : 0) + (a & 2 ? int'(n) : 0) + (a & 4 ? int'(o) : 0) + (a & 8 ? int'(p) : 0);
      checks++;
      if (int'(sum) != exp) begin
        failures++;
        $display("FAIL addr=%0d m=%0d n=%0d o=%0d p=%0d sum=%0d exp=%0d", a, m, n, o, p, sum, exp);
      end
    end
  endtask

  initial begin
    m = -16'sd32768; n = -16'sd32768; o = -16'sd32768; p = -16'sd32768; check_all();
    m = 16'sd32767;  n = 16'sd32767;  o = 16'sd32767;  p = 16'sd32767;  check_all();
    for (int t = 0; t < 200; t++) begin
      m = WW'($urandom); n = WW'($urandom); o = WW'($urandom); p = WW'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
