// lut_update: input delay, adder block and DA look-up table bank of the
// adaptive filter.
//
// The adaptive filter's tables hold sums of input samples, not of weights.
// The table of "window" t covers the four consecutive samples x(t), x(t-1),
// x(t-2), x(t-3); its word at address a is
//   word_t(a) = a[0]*x(t) + a[1]*x(t-1) + a[2]*x(t-2) + a[3]*x(t-3).
// When a sample is taken (`shift_en`), sixteen adder cells form the new
// window's table from the new sample and the three held in the input delay,
// and the bank shifts: lut[0] is always the table of the newest window, lut[k]
// that of the window k samples older. NWIN tables are kept, one per filter
// tap. The new tables are readable from the cycle after `shift_en`. Reset
// clears the delay and the bank (the filter starts from silence). Word 0 of
// every table is zero by construction; it is kept so that an address selects
// its word directly, and synthesis reduces it to a constant.
//
// Why one bank serves both halves of block LMS: weight w[n] multiplies
// x(k-n), and the window of age n starts exactly at x(k-n). For the output,
// weight group p reads the table of age 4p with the weights' bits as address;
// for the gradient, weight n reads the table of age n with the bits of four
// errors as address (see weight_update). Tables refilled from an input delay
// by an adder cell, and one table shared by both operations, follow the
// source design; the shifting bank of NWIN tables is this design's way of
// realising the sharing.
module lut_update #(
  parameter int unsigned NWIN = 16,
  parameter int unsigned XW   = 16,
  parameter int unsigned LW   = XW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_en,
  input  logic signed [XW-1:0] x_in,
  output logic signed [LW-1:0] lut [NWIN][16]
);
  logic signed [XW-1:0] dly [3];      // x(t-1), x(t-2), x(t-3)
  logic signed [LW-1:0] word [16];    // table of the window ending at x_in

  for (genvar a = 0; a < 16; a++) begin : g_word
    adder_cell #(.WW(XW), .OW(LW)) u_cell (
      .m(x_in), .n(dly[0]), .o(dly[1]), .p(dly[2]), .addr(4'(a)), .sum(word[a])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 3; j++) dly[j] <= '0;
      for (int k = 0; k < NWIN; k++)
        for (int a = 0; a < 16; a++) lut[k][a] <= '0;
    end else if (shift_en) begin
      dly[0] <= x_in;
      dly[1] <= dly[0];
      dly[2] <= dly[1];
      lut[0] <= word;
      for (int k = 1; k < NWIN; k++) lut[k] <= lut[k-1];
    end
  end
endmodule
