// error_computation: estimation error of the adaptive filter.
//
// e = d - y, where d is the desired input and y the filter output, both XW-bit
// two's complement. The difference is saturated to XW bits. Combinational;
// `e_valid` simply follows `y_valid`.
//
// The block and its desired input follow the source design; the saturation is
// this design's choice.
module error_computation #(
  parameter int unsigned XW = 16
) (
  input  logic                 y_valid,
  input  logic signed [XW-1:0] d,
  input  logic signed [XW-1:0] y,
  output logic                 e_valid,
  output logic signed [XW-1:0] e,
  output logic                 sat        // the difference did not fit
);
  import blms_pkg::sat_to;

  logic signed [XW:0] diff;

  always_comb begin
    diff    = (XW+1)'(d) - (XW+1)'(y);
    e       = XW'(sat_to(64'(diff), XW));
    sat     = (64'(diff) != 64'(e));
    e_valid = y_valid;
  end
endmodule
