// da_blms_filter: adaptive FIR filter, block LMS, distributed arithmetic with
// one table bank shared by filtering and weight adaptation.
//
// An N_TAPS-tap FIR filter whose weights adapt by block LMS, without
// multipliers. Every new input sample, together with the three before it,
// gets a 16-word table of all its sums (lut_update); the last N_TAPS such
// tables are kept. The output y(k) = sum_n w[n]*x(k-n) is read from the
// tables of ages 0, 4, 8, 12 with the weights' bits as addresses, one bit per
// cycle (mux_array, adder_tree, da_accumulator); the error e = d - y
// (error_computation) is stored, and after every fourth sample the same
// tables, addressed by the bits of the last four errors, give each weight's
// share of the block's gradient (weight_update). After BLOCK_L samples the
// weights are updated once.
//
// Interface: take a sample with `in_valid` while `read` is high (in_data = x,
// in_desired = d). WW+1 cycles later `out_valid` pulses with y on `y_out`
// (saturated), the unscaled sum on `y_full`, and e on `e_out` (`e_sat`
// if it was saturated). Samples and weights are fractions with one integer
// bit, Q1.(XW-1) and Q1.(WW-1) (Q1.15 at the defaults), so y = y_full >>>
// (WW-1); the gradient is scaled by 2^-(2*XW-WW-1) and by mu = 2^-MU_SHIFT.
// `read` returns WW+2 cycles after a sample is taken, XW cycles later after
// every fourth sample (gradient phase), and one cycle
// later still after a block's last sample (weight update, signalled by
// `block_update` one cycle later). `weights` shows the current weights.
// Synchronous to `clk`; `rst_n` is an asynchronous active-low reset that
// starts the filter with zero weights and zero history.
//
// The blocks (weight update, LUT update with input delay and adder cell, mux
// array, adder tree, error computation with desired input), 16 taps, 16-bit
// data and weights, four samples per table, serial DA and a block as long as
// the filter follow the source design. Number formats, step size and the
// cycle schedule are this design's own choices.
module da_blms_filter #(
  parameter int unsigned N_TAPS   = blms_pkg::N_TAPS,
  parameter int unsigned BLOCK_L  = blms_pkg::BLOCK_L,
  parameter int unsigned XW       = blms_pkg::XW,
  parameter int unsigned WW       = blms_pkg::WW,
  parameter int unsigned MU_SHIFT = blms_pkg::MU_SHIFT_DEF,
  localparam int unsigned FRAC    = WW - 1,            // y = full sum >>> FRAC
  localparam int unsigned GFRAC   = XW + XW - WW - 1,  // gradient scale before mu
  localparam int unsigned G       = N_TAPS / 4,
  localparam int unsigned LW      = XW + 2,
  localparam int unsigned TW      = LW + $clog2(G),
  localparam int unsigned ACC_W   = XW + WW + $clog2(N_TAPS),
  localparam int unsigned GW      = XW + XW + $clog2(BLOCK_L),
  localparam int unsigned BW      = $clog2((XW > WW) ? XW : WW)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [XW-1:0]    in_data,
  input  logic signed [XW-1:0]    in_desired,
  output logic                    read,
  output logic                    out_valid,
  output logic signed [XW-1:0]    y_out,
  output logic signed [ACC_W-1:0] y_full,
  output logic signed [XW-1:0]    e_out,
  output logic                    e_sat,
  output logic                    block_update,
  output logic signed [WW-1:0]    weights [N_TAPS]
);
  logic                 shift_en, da_start, conv_en, da_last, out_cycle;
  logic                 e_we, corr_en, apply, y_done;
  logic        [1:0]    e_idx;
  logic        [BW-1:0] bit_sel;
  logic signed [XW-1:0] d_lat;
  logic signed [LW-1:0] lut  [N_TAPS][16];
  logic        [3:0]    addr [N_TAPS];
  logic signed [LW-1:0] word [N_TAPS];
  logic signed [LW-1:0] grp_word [G];
  logic signed [TW-1:0] tsum;

  blms_control #(.WW(WW), .XW(XW), .BLOCK_L(BLOCK_L)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_desired, .read, .shift_en, .da_start, .conv_en,
    .da_last, .out_cycle, .e_we, .e_idx, .corr_en, .apply, .bit_sel, .d_out(d_lat)
  );

  lut_update #(.NWIN(N_TAPS), .XW(XW), .LW(LW)) u_lut (
    .clk, .rst_n, .shift_en, .x_in(in_data), .lut
  );

  mux_array #(.NPORT(N_TAPS), .LW(LW)) u_mux (.lut, .addr, .word);

  // the output uses the ports of ages 0, 4, 8, ...
  always_comb for (int p = 0; p < G; p++) grp_word[p] = word[4*p];

  adder_tree #(.NIN(G), .IW(LW)) u_tree (.in_word(grp_word), .sum(tsum));

  da_accumulator #(.NB(WW), .XW(XW), .TW(TW), .ACC_W(ACC_W), .FRAC(FRAC)) u_acc (
    .clk, .rst_n, .start(da_start), .en(conv_en), .last(da_last),
    .bit_idx(bit_sel), .tsum, .done(y_done), .acc_full(y_full), .y_out
  );

  error_computation #(.XW(XW)) u_err (
    .y_valid(y_done), .d(d_lat), .y(y_out), .e_valid(out_valid), .e(e_out), .sat(e_sat)
  );

  weight_update #(.N_TAPS(N_TAPS), .XW(XW), .WW(WW), .LW(LW), .GW(GW), .FRAC(GFRAC),
                  .MU_SHIFT(MU_SHIFT)) u_wu (
    .clk, .rst_n, .conv_en, .corr_en, .bit_sel, .e_we, .e_idx, .e(e_out), .apply,
    .word, .addr, .weights, .updated(block_update)
  );

  // The accumulator's result must appear exactly in the controller's output cycle.
  a_out_cycle: assert property (@(posedge clk) disable iff (!rst_n) y_done == out_cycle);
endmodule
