// shift_register: tap delay line and bit-serial LUT address generator of the
// fixed-coefficient DA FIR filter.
//
// The line holds the last N_TAPS input samples: taps[0] is the newest x(k),
// taps[n] is x(k-n). When `shift_en` is high the new sample enters at taps[0]
// and every older sample moves one place down. For serial distributed
// arithmetic the filter reads one bit position of every tap per cycle:
// addr[g] = {taps[4g+3][bit_sel], ..., taps[4g][bit_sel]}, the address of
// group g's LUT. Both `taps` and `addr` are combinational views of the
// registers. Reset clears the line (the filter starts from silence).
//
// The shift register feeding the LUT addresses, and addresses built from the
// same bit position of the input samples (least significant bit first),
// follow the source design; the bit order inside an address is this design's
// choice.
module shift_register #(
  parameter int unsigned N_TAPS = 16,
  parameter int unsigned XW     = 16,
  localparam int unsigned G     = N_TAPS / 4,
  localparam int unsigned BW    = $clog2(XW)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_en,
  input  logic signed [XW-1:0] x_in,
  input  logic        [BW-1:0] bit_sel,
  output logic signed [XW-1:0] taps [N_TAPS],
  output logic        [3:0]    addr [G]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N_TAPS; n++) taps[n] <= '0;
    end else if (shift_en) begin
      taps[0] <= x_in;
      for (int n = 1; n < N_TAPS; n++) taps[n] <= taps[n-1];
    end
  end

  always_comb begin
    for (int g = 0; g < G; g++)
      for (int j = 0; j < 4; j++) addr[g][j] = taps[4*g+j][bit_sel];
  end
endmodule
