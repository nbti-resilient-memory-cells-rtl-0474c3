// Write-side encoder for a word of 4-NAND cells.
//
// Each cell stores two data bits {B2,B1} as the position of the single low
// bitline among BL4..BL1, and the position depends on the balancing state
// {ST2,ST1}. The mapping used is the 16-row table of the document: for state
// s and value v, BL4 is low when v = s, BL3 when v = s+1, BL2 when v = s+2 and
// BL1 when v = s+3 (all mod 4). Equivalently d = (v - s) mod 4 selects the low
// line, BL(4-d). For BL4 this is the document's equation
// BL4 = (ST1 xor B1) + (ST2 xor B2). Over the four states every value lands
// on every bitline once, which gives the 25% balance.
//
// Cell c takes data bits [2c+1:2c] (B2 = bit 2c+1, B1 = bit 2c); this bit
// order is this design's choice. Purely combinational.
module nand4_encoder
  import nbti_rf_pkg::*;
#(
  parameter int unsigned CELLS = 16
) (
  input  bal_state_t                   st,
  input  logic [2*CELLS-1:0]           data,
  output logic [CELLS-1:0][NAND_N-1:0] bl
);

  always_comb begin
    for (int unsigned c = 0; c < CELLS; c++) begin
      cell_data_t d;
      d     = data[2*c +: 2] - st;
      // d = 0 -> BL4 low, 1 -> BL3, 2 -> BL2, 3 -> BL1.
      bl[c] = ~(cell_bl_t'(4'b1000) >> d);
    end
  end

endmodule
