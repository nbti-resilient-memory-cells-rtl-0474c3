// Read-side decoder for a word of 4-NAND cells.
//
// Inverse of nand4_encoder. The position of the single low bitline gives the
// distance d = (v - s) mod 4 (BL4 low: 0, BL3: 1, BL2: 2, BL1: 3), and the
// stored value is v = (d + s) mod 4, with s = {ST2,ST1} the balancing state
// the row was written in. As sums of products, d[0] = ~BL3 | ~BL1 and
// d[1] = ~BL2 | ~BL1.
//
// This follows the document's 16-row mapping table; the sums of products
// here are this design's own reduction of it.
//
// `bad[c]` is high when cell c does not show exactly one low bitline, which
// no stable cell can produce. Purely combinational.
module nand4_decoder
  import nbti_rf_pkg::*;
#(
  parameter int unsigned CELLS = 16
) (
  input  bal_state_t                   st,
  input  logic [CELLS-1:0][NAND_N-1:0] bl,
  output logic [2*CELLS-1:0]           data,
  output logic [CELLS-1:0]             bad
);

  always_comb begin
    for (int unsigned c = 0; c < CELLS; c++) begin
      cell_data_t d;
      d[0]            = ~bl[c][2] | ~bl[c][0];
      d[1]            = ~bl[c][1] | ~bl[c][0];
      data[2*c +: 2]  = d + st;
      bad[c]          = !one_low(bl[c]);
    end
  end

endmodule
