// Storage array of N-NAND cells, ROWS words of COLS cells, RP read ports and
// WP write ports.
//
// Each port has its own wordline decoder: port p's wordline for row r is high
// when the port is enabled and its address equals r. Every cell of the row
// then connects to that port's N bitlines of its column.
//
// Read bitlines are modelled as precharged lines: a bitline reads 1 unless the
// selected cell pulls it low, so `rd_bl[p][c]` is the NOR of the pull-downs
// of column c on port p. With exactly one NAND output low per cell, exactly
// one of a column's N bitlines reads 0. A read port with no row selected
// reads all ones. Write ports carry the bitline pattern produced by the
// encoder; it is taken by the addressed row at the rising clock edge.
//
// The document gives the cell and its bitlines; the decoders, the precharge
// model, the write priority (lowest port) and the reset are this design's.
module nand_cell_array #(
  parameter int unsigned   ROWS     = 256,
  parameter int unsigned   COLS     = 16,
  parameter int unsigned   N        = 4,
  parameter int unsigned   RP       = 6,
  parameter int unsigned   WP       = 3,
  parameter logic [N-1:0]  RESET_BL = {1'b0, {(N-1){1'b1}}},
  localparam int unsigned  AW       = $clog2(ROWS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [RP-1:0]                  rd_en,
  input  logic [RP-1:0][AW-1:0]          rd_addr,
  output logic [RP-1:0][COLS-1:0][N-1:0] rd_bl,
  input  logic [WP-1:0]                  wr_en,
  input  logic [WP-1:0][AW-1:0]          wr_addr,
  input  logic [WP-1:0][COLS-1:0][N-1:0] wr_bl
);

  // Wordlines, one per row and port.
  logic [ROWS-1:0][RP-1:0] rd_wl;
  logic [ROWS-1:0][WP-1:0] wr_wl;

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      for (int unsigned p = 0; p < RP; p++) rd_wl[r][p] = rd_en[p] && (rd_addr[p] == AW'(r));
      for (int unsigned p = 0; p < WP; p++) wr_wl[r][p] = wr_en[p] && (wr_addr[p] == AW'(r));
    end
  end

  // Pull-downs of every cell onto its column's read bitlines.
  logic [ROWS-1:0][COLS-1:0][RP-1:0][N-1:0] pull;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [WP-1:0][N-1:0] cell_wr_bl;
      logic [N-1:0]         q;

      always_comb begin
        for (int unsigned p = 0; p < WP; p++) cell_wr_bl[p] = wr_bl[p][c];
      end

      nand_cell #(.N(N), .RP(RP), .WP(WP), .RESET_BL(RESET_BL)) u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .wr_wl   (wr_wl[r]),
        .wr_bl   (cell_wr_bl),
        .rd_wl   (rd_wl[r]),
        .rd_pull (pull[r][c]),
        .q       (q)
      );
    end
  end

  // Precharged bitlines: high unless some selected cell pulls them low.
  for (genvar p = 0; p < RP; p++) begin : g_rd_bl
    for (genvar c = 0; c < COLS; c++) begin : g_col
      always_comb begin
        logic [N-1:0] any_pull;
        any_pull = '0;
        for (int unsigned r = 0; r < ROWS; r++) any_pull |= pull[r][c][p];
        rd_bl[p][c] = ~any_pull;
      end
    end
  end

endmodule
