// da_accumulator: shift-accumulator of serial distributed arithmetic.
//
// An inner product sum_n a[n]*b[n] is built one bit of the b operands at a
// time, least significant bit first: for bit position k the adder tree
// delivers T_k = sum_n a[n]*bit_k(b[n]) (read from the DA look-up tables) and
// this block adds T_k * 2^k, except for the sign bit (k = NB-1) of the
// two's-complement operands, whose weight is -2^(NB-1), so that term is
// subtracted. In the fixed FIR the serial operands are the input samples; in
// the adaptive filter they are the weights. `start` clears the accumulator;
// each cycle with `en` high adds one term. On the cycle with `last` high the
// sum is complete: one cycle later `done` pulses for a cycle with the full
// sum on `acc_full` and the Q1.15 output y = acc_full >>> FRAC, saturated to
// XW bits, on `y_out`. Those outputs hold until the next result.
//
// Serial DA with an accumulator and an output-valid flag follows the source
// design; the output scaling and saturation are this design's choices.
module da_accumulator #(
  parameter int unsigned NB    = 16,   // number of serial bits
  parameter int unsigned XW    = 16,   // output width
  parameter int unsigned TW    = 20,   // adder-tree sum width
  parameter int unsigned ACC_W = 36,
  parameter int unsigned FRAC  = 15,
  localparam int unsigned BW   = $clog2(NB)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    en,
  input  logic                    last,
  input  logic        [BW-1:0]    bit_idx,
  input  logic signed [TW-1:0]    tsum,
  output logic                    done,
  output logic signed [ACC_W-1:0] acc_full,
  output logic signed [XW-1:0]    y_out
);
  import blms_pkg::sat_to;

  logic signed [ACC_W-1:0] acc, term, acc_nxt;

  always_comb begin
    term = ACC_W'(tsum) <<< bit_idx;
    acc_nxt = (bit_idx == BW'(NB - 1)) ? acc - term : acc + term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      done     <= 1'b0;
      acc_full <= '0;
      y_out    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc <= '0;
      end else if (en) begin
        acc <= acc_nxt;
        if (last) begin
          done     <= 1'b1;
          acc_full <= acc_nxt;
          y_out    <= XW'(sat_to(64'(acc_nxt >>> FRAC), XW));
        end
      end
    end
  end
endmodule
