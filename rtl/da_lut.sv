// Partial-sum look-up table of one DA tap group.
//
// The address holds one bit from each of the group's LUT_IN taps (bit j from
// tap j of the group, all of the same weight). The entry is the sum of the
// coefficients whose bit is set, so the LUT replaces LUT_IN multiplications
// by one bit. The table is a constant computed at elaboration from the COEF
// parameter: entry[a] = sum over j of (a[j] ? COEF[j] : 0). The read is
// combinational (a ROM). The default COEF is the first tap group (taps 0-3)
// of the package coefficients.
// Splitting the 32 taps into 4-input LUTs follows the partitioned-LUT filter
// described; the coefficient values are this design's own.
module da_lut
  import fir_da_pkg::*;
#(
  parameter coef_t COEF [LUT_IN] = '{COEFS[0], COEFS[1], COEFS[2], COEFS[3]}
) (
  input  logic [LUT_IN-1:0] addr,
  output lut_word_t         data
);
  localparam int unsigned DEPTH = 2 ** LUT_IN;
  typedef lut_word_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned a = 0; a < DEPTH; a++)
      t[a] = lut_entry(COEF, a);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign data = TABLE[addr];
endmodule
