// adder_cell: one word of a distributed-arithmetic look-up table.
//
// A DA table for four operands (m, n, o, p) holds, at address a, the sum of
// the operands whose address bit is set: word(a) = a[0]*m + a[1]*n + a[2]*o +
// a[3]*p. This cell computes that word for one address, so sixteen of them
// build a whole table at once. In the adaptive filter the operands are four
// consecutive input samples. Purely combinational; the output has two guard
// bits so no sum can overflow.
//
// The adder cell filling the table and its four operands m, n, o, p follow
// the source design; the gating of each operand by its address bit is this
// design's reading of it.
module adder_cell #(
  parameter int unsigned WW = 16,      // operand width
  parameter int unsigned OW = WW + 2   // table word width
) (
  input  logic signed [WW-1:0] m,
  input  logic signed [WW-1:0] n,
  input  logic signed [WW-1:0] o,
  input  logic signed [WW-1:0] p,
  input  logic        [3:0]    addr,   // which operands take part in the sum
  output logic signed [OW-1:0] sum
);
  always_comb begin
    sum = '0;
    if (addr[0]) sum = sum + OW'(m);
    if (addr[1]) sum = sum + OW'(n);
    if (addr[2]) sum = sum + OW'(o);
    if (addr[3]) sum = sum + OW'(p);
  end
endmodule
