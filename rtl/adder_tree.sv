// adder_tree: adds the words read from the N/4 DA look-up tables.
//
// A balanced binary tree of adders: level 0 holds the inputs, each further
// level adds neighbouring pairs and grows the width by one bit, so the result
// cannot overflow. The number of inputs must be a power of two. Purely
// combinational.
//
// The adder tree after the LUTs follows the source design; its balanced shape
// is this design's choice.
module adder_tree #(
  parameter int unsigned NIN = 4,
  parameter int unsigned IW  = 18,
  localparam int unsigned LEVELS = $clog2(NIN),
  localparam int unsigned OW     = IW + LEVELS
) (
  input  logic signed [IW-1:0] in_word [NIN],
  output logic signed [OW-1:0] sum
);
  // node[l][k]: k-th partial sum at level l, kept at full output width
  logic signed [OW-1:0] node [LEVELS+1][NIN];

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int k = 0; k < NIN; k++) node[l][k] = '0;
    for (int k = 0; k < NIN; k++) node[0][k] = OW'(in_word[k]);
    for (int l = 1; l <= LEVELS; l++)
      for (int k = 0; k < (NIN >> l); k++)
        node[l][k] = node[l-1][2*k] + node[l-1][2*k+1];
    sum = node[LEVELS][0];
  end
endmodule
