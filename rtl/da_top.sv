// da_top: the two distributed-arithmetic filters of this design, side by side.
//
//  * da_blms_filter (ports blms_*): the adaptive 16-tap FIR filter, block LMS,
//    whose output and weight gradient come from one shared bank of input-sum
//    look-up tables.
//  * da_fir (ports fir_*): a fixed-coefficient 16-tap FIR filter in serial
//    distributed arithmetic, with its coefficients' sums in constant tables.
// The two share the clock and reset and nothing else; each keeps its own
// handshake (see the two modules for the timing). Parameters are those of
// the two filters at their defaults.
module da_top #(
  parameter int unsigned N_TAPS   = blms_pkg::N_TAPS,
  parameter int unsigned XW       = blms_pkg::XW,
  parameter int unsigned WW       = blms_pkg::WW,
  localparam int unsigned ACC_W   = XW + WW + $clog2(N_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // adaptive filter
  input  logic                    blms_in_valid,
  input  logic signed [XW-1:0]    blms_in_data,
  input  logic signed [XW-1:0]    blms_in_desired,
  output logic                    blms_read,
  output logic                    blms_out_valid,
  output logic signed [XW-1:0]    blms_y_out,
  output logic signed [ACC_W-1:0] blms_y_full,
  output logic signed [XW-1:0]    blms_e_out,
  output logic                    blms_e_sat,
  output logic                    blms_block_update,
  output logic signed [WW-1:0]    blms_weights [N_TAPS],
  // fixed FIR filter
  input  logic                    fir_in_valid,
  input  logic signed [XW-1:0]    fir_in_data,
  output logic                    fir_read,
  output logic                    fir_out_valid,
  output logic signed [XW-1:0]    fir_y_out,
  output logic signed [ACC_W-1:0] fir_y_full
);
  da_blms_filter #(.N_TAPS(N_TAPS), .XW(XW), .WW(WW)) u_blms (
    .clk, .rst_n,
    .in_valid(blms_in_valid), .in_data(blms_in_data), .in_desired(blms_in_desired),
    .read(blms_read), .out_valid(blms_out_valid), .y_out(blms_y_out),
    .y_full(blms_y_full), .e_out(blms_e_out), .e_sat(blms_e_sat),
    .block_update(blms_block_update), .weights(blms_weights)
  );

  da_fir #(.N_TAPS(N_TAPS), .XW(XW), .CW(WW)) u_fir (
    .clk, .rst_n,
    .in_valid(fir_in_valid), .in_data(fir_in_data), .read(fir_read),
    .out_valid(fir_out_valid), .y_out(fir_y_out), .y_full(fir_y_full)
  );
endmodule
