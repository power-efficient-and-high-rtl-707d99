// mux_array: read ports into the bank of DA look-up tables.
//
// Port k reads table k of the bank at its own 4-bit address:
// word[k] = lut[k][addr[k]]. In the adaptive filter port k reads the table of
// the window of age k, which is the one weight k needs; during the output
// computation only ports 0, 4, 8, ... are addressed, during the gradient
// computation all of them. Purely combinational: one 16-to-1 multiplexer per
// port.
//
// The multiplexer array between the tables and the adder tree follows the
// source design; its fixed port-to-table wiring is this design's choice.
module mux_array #(
  parameter int unsigned NPORT = 16,
  parameter int unsigned LW    = 18
) (
  input  logic signed [LW-1:0] lut  [NPORT][16],
  input  logic        [3:0]    addr [NPORT],
  output logic signed [LW-1:0] word [NPORT]
);
  always_comb begin
    for (int k = 0; k < NPORT; k++) word[k] = lut[k][addr[k]];
  end
endmodule
