// da_fir: fixed-coefficient FIR filter in serial distributed arithmetic.
//
// y(k) = sum_{n=0}^{N_TAPS-1} c[n] * x(k-n), computed without multipliers.
// The coefficients are split into N_TAPS/4 groups of four; each group has a
// constant 16-word look-up table (da_lut_rom) of all sums of its
// coefficients. The last N_TAPS samples wait in a shift register; in each of
// XW cycles one bit position of all of them, least significant first, forms
// one 4-bit address per table, the adder tree adds the N_TAPS/4 words read,
// and the accumulator adds that sum at the bit's weight (the sign bit's term
// is subtracted).
//
// Interface: a sample is taken on `in_valid` while `read` is high; XW+1
// cycles later `out_valid` pulses with y (the full sum >>> (CW-1), as the
// coefficients are Q1.(CW-1); Q1.15 at the defaults; saturated) on `y_out`
// and the unscaled sum on `y_full`. One sample every
// XW+2 cycles. Synchronous to `clk`, asynchronous active-low reset `rst_n`.
//
// 16 taps, 16-bit input and coefficients, four coefficients per table, serial
// DA, and the chain input control -> shift register -> tables -> adder tree
// -> accumulator with READ / INPUT VALID / OUTPUT VALID signals follow the
// source design. The default coefficients (a 16-tap Hamming-windowed sinc
// low-pass, cut-off 0.2 of the sample rate, unity DC gain, Q1.15:
// c[n] = round(32768 * h[n] / sum(h)), h[n] = 0.4*sinc(0.4*(n-7.5)) *
// (0.54 - 0.46*cos(2*pi*n/15))) are this design's own example; the source
// gives none.
module da_fir #(
  parameter int unsigned N_TAPS = 16,
  parameter int unsigned XW     = 16,
  parameter int unsigned CW     = 16,
  parameter int          COEFS [N_TAPS] = '{0, 183, 259, -541, -1665, 0, 6025, 12124,
                                            12124, 6025, 0, -1665, -541, 259, 183, 0},
  localparam int unsigned FRAC  = CW - 1,   // coefficients are Q1.(CW-1)
  localparam int unsigned G     = N_TAPS / 4,
  localparam int unsigned LW    = CW + 2,
  localparam int unsigned TW    = LW + $clog2(G),
  localparam int unsigned ACC_W = XW + CW + $clog2(N_TAPS),
  localparam int unsigned BW    = $clog2(XW)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [XW-1:0]    in_data,
  output logic                    read,
  output logic                    out_valid,
  output logic signed [XW-1:0]    y_out,
  output logic signed [ACC_W-1:0] y_full
);
  logic                 shift_en, da_start, da_en, da_last, out_cycle;
  logic        [BW-1:0] bit_sel;
  logic signed [XW-1:0] taps [N_TAPS];
  logic        [3:0]    addr [G];
  logic signed [LW-1:0] word [G];
  logic signed [TW-1:0] tsum;

  input_control #(.NB(XW)) u_ctrl (
    .clk, .rst_n, .in_valid, .read, .shift_en, .da_start, .da_en, .da_last,
    .bit_sel, .out_cycle
  );

  shift_register #(.N_TAPS(N_TAPS), .XW(XW)) u_sr (
    .clk, .rst_n, .shift_en, .x_in(in_data), .bit_sel, .taps, .addr
  );

  for (genvar g = 0; g < G; g++) begin : g_lut
    da_lut_rom #(.CW(CW), .LW(LW),
                 .COEF('{COEFS[4*g], COEFS[4*g+1], COEFS[4*g+2], COEFS[4*g+3]})) u_rom (
      .addr(addr[g]), .word(word[g])
    );
  end

  adder_tree #(.NIN(G), .IW(LW)) u_tree (.in_word(word), .sum(tsum));

  da_accumulator #(.NB(XW), .XW(XW), .TW(TW), .ACC_W(ACC_W), .FRAC(FRAC)) u_acc (
    .clk, .rst_n, .start(da_start), .en(da_en), .last(da_last), .bit_idx(bit_sel),
    .tsum, .done(out_valid), .acc_full(y_full), .y_out
  );

  // The result must appear exactly in the controller's output cycle.
  a_out_cycle: assert property (@(posedge clk) disable iff (!rst_n) out_valid == out_cycle);
endmodule
