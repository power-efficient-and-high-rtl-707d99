// adder_tree_tb: compares the tree's sum of four LUT words with a plain
// integer sum, for random and extreme inputs.
module adder_tree_tb;
  localparam int NIN = 4, IW = 18;
  logic signed [IW-1:0] in_word [NIN];
  logic signed [IW+1:0] sum;
  int checks = 0, failures = 0;

  adder_tree #(.NIN(NIN), .IW(IW)) dut (.in_word, .sum);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int exp;
      exp = 0;
      for (int k = 0; k < NIN; k++) begin
        case (t)
          0: in_word[k] = {1'b1, {(IW-1){1'b0}}};
          1: in_word[k] = {1'b0, {(IW-1){1'b1}}};
          default: in_word[k] = IW'($urandom);
        endcase
        exp += int'(in_word[k]);
      end
      #1;
      checks++;
      if (int'(sum) != exp) begin
        failures++;
        $display("FAIL got=%0d exp=%0d", sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
