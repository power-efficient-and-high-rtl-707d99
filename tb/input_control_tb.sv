// input_control_tb: drives the fixed filter's handshake with random source
// gaps and checks the sequence: shift_en only with read & in_valid, NB bit
// cycles in order with da_last on the last, the output cycle, read low
// throughout, and NB+2 cycles per sample.
module input_control_tb;
  localparam int NB = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic read, shift_en, da_start, da_en, da_last, out_cycle;
  logic [3:0] bit_sel;
  int checks = 0, failures = 0;

  input_control #(.NB(NB)) dut (
    .clk, .rst_n, .in_valid, .read, .shift_en, .da_start, .da_en, .da_last, .bit_sel, .out_cycle);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      @(negedge clk);
      repeat ($urandom_range(0, 3)) begin
        #1 chk(read && !shift_en && !da_en && !out_cycle, "idle state wrong");
        @(negedge clk);
      end
      in_valid = 1;
      #1 chk(read && shift_en && da_start, "sample not taken");
      @(negedge clk);
      in_valid = (s % 3 == 0);   // a held valid must not be taken while busy
      for (int b = 0; b < NB; b++) begin
        chk(da_en && !read && !shift_en && bit_sel == 4'(b) && da_last == (b == NB - 1),
            $sformatf("bit cycle %0d", b));
        @(negedge clk);
      end
      chk(out_cycle && !da_en && !read && !shift_en, "output cycle missing");
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
