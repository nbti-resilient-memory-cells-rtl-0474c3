// Shared types and constants for the 4-NAND-cell register file.
//
// A 4-NAND cell keeps exactly one of its four NAND outputs low, so it holds
// one of four states and stores two data bits. Its four outputs reach four
// bitlines per port, BL1..BL4, with BLk driven by NAND k. A bitline vector is
// therefore "one-hot low": exactly one bit is 0. The balancing state
// {ST2,ST1} selects one of four data-to-bitline mappings; rotating it through
// all four values gives every NAND output, and so every PMOS gate in the cell,
// a low level 25% of the time.
package nbti_rf_pkg;

  // Gates per cell and data bits per cell (log2 of the gate count).
  localparam int unsigned NAND_N        = 4;
  localparam int unsigned BITS_PER_CELL = 2;

  // Balancing state {ST2,ST1}.
  typedef logic [1:0] bal_state_t;

  // Bitlines of one cell, index k-1 holds BLk.
  typedef logic [NAND_N-1:0] cell_bl_t;

  // Two data bits of one cell, {B2,B1}.
  typedef logic [BITS_PER_CELL-1:0] cell_data_t;

  // Bitline pattern of a freshly reset cell: data 00 in state 00, which by
  // the mapping puts the single low output on BL4.
  localparam cell_bl_t CELL_RESET_BL = 4'b0111;

  // True when exactly one bit of a cell's bitline vector is low.
  function automatic logic one_low(input cell_bl_t bl);
    return $countones(~bl) == 1;
  endfunction

endpackage
