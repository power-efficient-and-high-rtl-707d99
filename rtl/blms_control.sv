// blms_control: sample handshake and phase sequencer of the adaptive filter.
//
// A sample (x with its desired value d) is taken in the cycle where `read`
// and `in_valid` are both high; `read` is high only in the idle state. Per
// sample the controller then runs:
//   output phase   WW cycles, `conv_en` high, `bit_sel` = 0 .. WW-1
//                  (`da_last` on the last), one weight bit per cycle;
//   output cycle   1 cycle, `out_cycle`: y and e are valid, `e_we` stores e;
//   gradient phase XW cycles, `corr_en` high, `bit_sel` = 0 .. XW-1, only
//                  after every fourth sample of a block;
//   apply          1 cycle, only after the block's last sample.
// So a sample takes WW+2 cycles, every fourth XW more, and the last of a
// block one more again; `read` stays low meanwhile. `e_idx` is the sample's
// position in its block modulo 4. Taking a sample also pulses `shift_en` (new
// table, delay line shift) and `da_start` (clear the accumulator) and latches
// d on `d_out`.
//
// The source design names an input control with READ and INPUT VALID and
// the update of the weights once per block; the phase schedule is this
// design's own.
module blms_control #(
  parameter int unsigned WW      = 16,
  parameter int unsigned XW      = 16,
  parameter int unsigned BLOCK_L = 16,
  localparam int unsigned BW     = $clog2((XW > WW) ? XW : WW),
  localparam int unsigned CW     = $clog2(BLOCK_L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] in_desired,
  output logic                 read,
  output logic                 shift_en,
  output logic                 da_start,
  output logic                 conv_en,
  output logic                 da_last,
  output logic                 out_cycle,
  output logic                 e_we,
  output logic        [1:0]    e_idx,
  output logic                 corr_en,
  output logic                 apply,
  output logic        [BW-1:0] bit_sel,
  output logic signed [XW-1:0] d_out
);
  typedef enum logic [2:0] {S_IDLE, S_CONV, S_OUT, S_CORR, S_APPLY} state_t;
  state_t state;

  logic [BW-1:0] bcnt;
  logic [CW-1:0] scnt;   // position of the next sample in its block
  logic [CW-1:0] cur;    // position of the sample being processed

  always_comb begin
    read      = (state == S_IDLE);
    shift_en  = read && in_valid;
    da_start  = shift_en;
    conv_en   = (state == S_CONV);
    da_last   = conv_en && (bcnt == BW'(WW - 1));
    out_cycle = (state == S_OUT);
    e_we      = out_cycle;
    e_idx     = cur[1:0];
    corr_en   = (state == S_CORR);
    apply     = (state == S_APPLY);
    bit_sel   = bcnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      bcnt  <= '0;
      scnt  <= '0;
      cur   <= '0;
      d_out <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (shift_en) begin
          d_out <= in_desired;
          cur   <= scnt;
          scnt  <= (scnt == CW'(BLOCK_L - 1)) ? '0 : scnt + 1'b1;
          bcnt  <= '0;
          state <= S_CONV;
        end
        S_CONV: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == BW'(WW - 1)) state <= S_OUT;
        end
        S_OUT: begin
          bcnt  <= '0;
          state <= (cur[1:0] == 2'd3) ? S_CORR : S_IDLE;
        end
        S_CORR: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == BW'(XW - 1)) state <= (cur == CW'(BLOCK_L - 1)) ? S_APPLY : S_IDLE;
        end
        S_APPLY: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
