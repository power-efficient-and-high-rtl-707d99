// error_computation_tb: checks e = d - y with saturation to 16 bits and the
// saturation flag, for random values and the two overflow corners.
module error_computation_tb;
  localparam int XW = 16;
  logic y_valid;
  logic signed [XW-1:0] d, y, e;
  logic e_valid, sat;
  int checks = 0, failures = 0;

  error_computation #(.XW(XW)) dut (.y_valid, .d, .y, .e_valid, .e, .sat);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int diff, exp;
      bit exp_sat;
      case (t)
        0: begin d = 16'sd32767;  y = -16'sd32768; end
        1: begin d = -16'sd32768; y = 16'sd32767;  end
        default: begin d = XW'($urandom); y = XW'($urandom); end
      endcase
      y_valid = t[0];
      #1;
      diff = int'(d) - int'(y);
      exp = diff > 32767 ? 32767 : (diff < -32768 ? -32768 : diff);
      exp_sat = (exp != diff);
      checks++;
      if (int'(e) != exp || sat != exp_sat || e_valid != y_valid) begin
        failures++;
        $display("FAIL d=%0d y=%0d e=%0d exp=%0d sat=%0b", d, y, e, exp, sat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
