// dbnr_conv_rom -- data-conversion ROM: binary sample to double-base digit.
//
// Maps a DATA_W-bit two's-complement sample x to its DBNR, the single digit
// s * 2^b * 3^t closest to x (see dbns_pkg::to_dbnr). Zero is flagged rather
// than approximated. The design uses one such ROM for the input data; the
// fixed coefficients go through the same conversion function when the filter
// is elaborated, so both operands of every product share one representation.
//
// The table has 2^DATA_W entries and is filled at elaboration; entry i holds
// the digit of the signed value whose bit pattern is i. It is purely
// combinational: d follows x in the same cycle.
//
// That a ROM converts the data to DBNR is the published design; the table
// contents follow from the closest-digit rule, which is this design's choice.
module dbnr_conv_rom
  import dbns_pkg::*;
#(
  parameter int DATA_W = 8
) (
  input  logic [DATA_W-1:0] x,
  output dbnr_t             d
);

  localparam int DEPTH = 2 ** DATA_W;

  typedef logic [$bits(dbnr_t)-1:0] table_t [DEPTH];

  function automatic table_t fill();
    table_t tab;
    for (int i = 0; i < DEPTH; i++)
      tab[i] = to_dbnr((i >= DEPTH / 2) ? i - DEPTH : i);
    return tab;
  endfunction

  localparam table_t TABLE = fill();

  assign d = dbnr_t'(TABLE[x]);

endmodule
