// da_lut_rom: constant distributed-arithmetic look-up table of four
// coefficients.
//
// For four fixed coefficients c0..c3 the table holds, at address a,
// word(a) = a[0]*c0 + a[1]*c1 + a[2]*c2 + a[3]*c3, the sum of the
// coefficients whose address bit is set. The sixteen words are worked out at
// elaboration from the COEF parameter, so the table synthesizes to constants;
// reading is combinational. The word has two guard bits over the coefficient
// width.
//
// Four coefficients per look-up table, precomputed because the coefficients
// are constant, follow the source design.
module da_lut_rom #(
  parameter int unsigned CW        = 16,            // coefficient width
  parameter int unsigned LW        = CW + 2,        // word width
  parameter int          COEF [4]  = '{0, 0, 0, 0}
) (
  input  logic        [3:0]    addr,
  output logic signed [LW-1:0] word
);
  typedef logic signed [LW-1:0] table_t [16];

  function automatic table_t build();
    table_t t;
    for (int a = 0; a < 16; a++) begin
      int s;
      s = 0;
      for (int j = 0; j < 4; j++) if (a[j]) s += COEF[j];
      t[a] = LW'(s);
    end
    return t;
  endfunction

  localparam table_t TABLE = build();

  assign word = TABLE[addr];
endmodule
