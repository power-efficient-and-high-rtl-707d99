// blms_control_tb: follows the adaptive filter's controller through several
// blocks, with random source gaps, and checks every cycle of the schedule:
// the handshake, WW output-phase cycles (bit_sel 0..WW-1, da_last on the
// last), the output cycle with e_we and e_idx = position mod 4, an XW-cycle
// gradient phase after every fourth sample, the apply cycle after the
// block's last sample, and read low throughout.
module blms_control_tb;
  localparam int WW = 16, XW = 16, L = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [XW-1:0] in_desired = 0;
  logic read, shift_en, da_start, conv_en, da_last, out_cycle, e_we, corr_en, apply;
  logic [1:0] e_idx;
  logic [3:0] bit_sel;
  logic signed [XW-1:0] d_out;
  int checks = 0, failures = 0;

  blms_control #(.WW(WW), .XW(XW), .BLOCK_L(L)) dut (
    .clk, .rst_n, .in_valid, .in_desired, .read, .shift_en, .da_start, .conv_en, .da_last,
    .out_cycle, .e_we, .e_idx, .corr_en, .apply, .bit_sel, .d_out);

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
    for (int s = 0; s < 4 * L; s++) begin
      logic signed [XW-1:0] dv;
      int pos;
      pos = s % L;
      @(negedge clk);
      repeat ($urandom_range(0, 2)) begin
        #1 chk(read && !shift_en && !conv_en && !corr_en && !apply, "idle state wrong");
        @(negedge clk);
      end
      dv = XW'($urandom);
      in_desired = dv;
      in_valid = 1;
      #1 chk(read && shift_en && da_start, "sample not taken");
      @(negedge clk);
      in_valid = 0;
      in_desired = XW'($urandom);
      for (int b = 0; b < WW; b++) begin
        chk(conv_en && !corr_en && !read && bit_sel == 4'(b) && da_last == (b == WW - 1),
            $sformatf("output phase bit %0d", b));
        @(negedge clk);
      end
      chk(out_cycle && e_we && e_idx == 2'(pos % 4) && !read && !conv_en, $sformatf("output cycle oc=%0b we=%0b idx=%0d pos=%0d read=%0b conv=%0b", out_cycle, e_we, e_idx, pos, read, conv_en));
      chk(d_out == dv, "desired value not latched");
      @(negedge clk);
      if (pos % 4 == 3) begin
        for (int b = 0; b < XW; b++) begin
          chk(corr_en && !conv_en && !read && bit_sel == 4'(b), $sformatf("gradient phase bit %0d", b));
          @(negedge clk);
        end
      end
      if (pos == L - 1) begin
        chk(apply && !read, "apply cycle missing");
        @(negedge clk);
      end
      chk(read && !apply && !corr_en, $sformatf("not idle after sample %0d", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
