// weight_update: weights, DA addressing and block-LMS update of the adaptive
// filter.
//
// Block LMS keeps the weights fixed for a block of BLOCK_L samples, sums the
// correlation of the error with the input over the block, and then updates
// every weight once:
//   grad[n]  = sum_{i in block} e(i) * x(i-n)
//   w[n]    <= sat(w[n] + (grad[n] >>> (FRAC + MU_SHIFT)))   (mu = 2^-MU_SHIFT)
// Both the output and the gradient come from the same input-sum tables
// (lut_update), so this block only drives their addresses and accumulates:
//  * output phase (`conv_en`), bit b of the weights: read port 4p is given
//    address {w[4p+3][b], w[4p+2][b], w[4p+1][b], w[4p][b]}; all other ports
//    address 0 (word 0 of every table is 0).
//  * gradient phase (`corr_en`), after every fourth error: with e0..e3 the
//    last four errors (e3 newest), every port n is given address
//    {e0[b], e1[b], e2[b], e3[b]}, and grad[n] adds the word read, shifted by
//    b; the sign bit's term (b = XW-1) is subtracted. This works because port
//    n reads the window of age n, whose samples are exactly those that the
//    four errors multiply for weight n.
//  * `apply` (once per block) updates the weights and clears the gradients;
//    `updated` pulses in the next cycle.
// `e_we` writes error `e` into slot `e_idx` (the sample's position modulo 4).
// Reset clears weights, gradients and errors. All timing comes from the
// controller (blms_control).
//
// Block-wise updating with block size equal to the filter length, and the
// gradient taken from the same tables as the output, follow the source
// design. The step size, the scaling, the saturation and the schedule (a
// gradient pass after every fourth sample) are this design's choices.
module weight_update #(
  parameter int unsigned N_TAPS   = 16,
  parameter int unsigned XW       = 16,   // error width (bits of the gradient pass)
  parameter int unsigned WW       = 16,   // weight width (bits of the output pass)
  parameter int unsigned LW       = XW + 2,
  parameter int unsigned GW       = 36,   // gradient accumulator width
  parameter int unsigned FRAC     = 15,
  parameter int unsigned MU_SHIFT = 6,
  localparam int unsigned BW      = $clog2((XW > WW) ? XW : WW)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 conv_en,
  input  logic                 corr_en,
  input  logic        [BW-1:0] bit_sel,
  input  logic                 e_we,
  input  logic        [1:0]    e_idx,
  input  logic signed [XW-1:0] e,
  input  logic                 apply,
  input  logic signed [LW-1:0] word    [N_TAPS],
  output logic        [3:0]    addr    [N_TAPS],
  output logic signed [WW-1:0] weights [N_TAPS],
  output logic                 updated
);
  import blms_pkg::sat_to;

  logic signed [XW-1:0] ebuf [4];
  logic signed [GW-1:0] grad [N_TAPS];

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) addr[k] = '0;
    if (corr_en) begin
      for (int k = 0; k < N_TAPS; k++)
        for (int j = 0; j < 4; j++) addr[k][j] = ebuf[3-j][bit_sel];
    end else if (conv_en) begin
      for (int p = 0; p < N_TAPS / 4; p++)
        for (int j = 0; j < 4; j++) addr[4*p][j] = weights[4*p+j][bit_sel];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      updated <= 1'b0;
      for (int j = 0; j < 4; j++) ebuf[j] <= '0;
      for (int n = 0; n < N_TAPS; n++) begin
        grad[n]    <= '0;
        weights[n] <= '0;
      end
    end else begin
      updated <= apply;
      if (e_we) ebuf[e_idx] <= e;
      if (corr_en) begin
        for (int n = 0; n < N_TAPS; n++) begin
          if (bit_sel == BW'(XW - 1)) grad[n] <= grad[n] - (GW'(word[n]) <<< bit_sel);
          else                        grad[n] <= grad[n] + (GW'(word[n]) <<< bit_sel);
        end
      end else if (apply) begin
        for (int n = 0; n < N_TAPS; n++) begin
          weights[n] <= WW'(sat_to(64'(weights[n]) + 64'(grad[n] >>> (FRAC + MU_SHIFT)), WW));
          grad[n]    <= '0;
        end
      end
    end
  end

  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n) !(conv_en && corr_en));
endmodule
