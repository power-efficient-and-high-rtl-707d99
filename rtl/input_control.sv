// input_control: sample handshake and bit sequencer of the fixed DA FIR filter.
//
// A sample is taken in the cycle where `read` and `in_valid` are both high;
// `read` is high only while the controller is idle. Taking a sample shifts it
// into the shift register (`shift_en`) and clears the accumulator
// (`da_start`). The next NB cycles step `bit_sel` from bit 0 (least
// significant) to bit NB-1 with `da_en` high and `da_last` on the final one.
// Then comes one output cycle (`out_cycle`), in which the accumulator shows
// the result, and the controller is idle again: one sample every NB+2 cycles.
//
// The READ / INPUT VALID / DATA INPUT handshake in front of the shift
// register and the bit-serial operation follow the source design; the exact
// cycle sequence is this design's choice.
module input_control #(
  parameter int unsigned NB = 16,        // input bits, one per cycle
  localparam int unsigned BW = $clog2(NB)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          read,
  output logic          shift_en,
  output logic          da_start,
  output logic          da_en,
  output logic          da_last,
  output logic [BW-1:0] bit_sel,
  output logic          out_cycle
);
  typedef enum logic [1:0] {S_IDLE, S_BITS, S_OUT} state_t;
  state_t state;
  logic [BW-1:0] bcnt;

  always_comb begin
    read      = (state == S_IDLE);
    shift_en  = read && in_valid;
    da_start  = shift_en;
    da_en     = (state == S_BITS);
    bit_sel   = bcnt;
    da_last   = (state == S_BITS) && (bcnt == BW'(NB - 1));
    out_cycle = (state == S_OUT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      bcnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (shift_en) begin
          bcnt  <= '0;
          state <= S_BITS;
        end
        S_BITS: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == BW'(NB - 1)) state <= S_OUT;
        end
        S_OUT:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
