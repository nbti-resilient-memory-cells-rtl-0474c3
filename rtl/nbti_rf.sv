// Multi-ported register file built from 4-NAND cells.
//
// ROWS words of WIDTH bits, RD_PORTS read ports and WR_PORTS write ports. Each
// word is WIDTH/2 4-NAND cells. A write encodes each pair of data bits, with
// the current balancing state, into a one-low pattern on four bitlines
// (nand4_encoder) and stores it in the addressed row (nand_cell_array). A
// read senses the row's bitlines, rebuilds the one bitline per cell left
// without a sense amplifier when SKIP_SENSE is set (bitline_recover), and
// decodes the data with the same state (nand4_decoder). The balancing state
// is rotated through its four values by balance_ctrl, which re-encodes every
// row in turn; that keeps each NAND output low 25% of the time whatever the
// data, against 50% for an inverter pair.
//
// Interface and timing:
//   rd_en/rd_addr -> rd_data, rd_err in the same cycle (combinational read);
//   rd_err[p] flags a cell of the word that did not show exactly one low line.
//   wr_en/wr_addr/wr_data are written at the rising edge of clk; a read of
//   the same row in that cycle returns the old word. If two write ports name
//   the same row, the lower-numbered port wins.
//   stall is high while the state rotation sweeps the array (ROWS cycles
//   every ROTATE_PERIOD cycles): read data are then not valid and writes are
//   ignored; the sweep uses read port 0 and write port 0 of the array.
//   rst_n is a synchronous active-low reset; it clears every word to zero.
//
// CELL_N = 3 builds the same file from 3-NAND cells instead: each pair of
// cells holds three data bits (nand3_pair_encoder / nand3_pair_decoder), a
// 32-bit word takes 11 pairs (the top data bit of the last pair is unused),
// and the balancing state cycles through three values, for a one-third low
// time per NAND output.
//
// Sizes follow the document's evaluation (256 words of 32 bits; 1 to 16
// ports, 9 in its worked examples; 4-NAND cells as the preferred cell). The
// split of the 9 ports into 6 read and 3 write ports, the rotation period and
// the stall are this design's choices.
module nbti_rf
  import nbti_rf_pkg::*;
#(
  parameter int unsigned  ROWS          = 256,
  parameter int unsigned  WIDTH         = 32,
  parameter int unsigned  RD_PORTS      = 6,
  parameter int unsigned  WR_PORTS      = 3,
  parameter int unsigned  ROTATE_PERIOD = 65536,
  parameter bit           SKIP_SENSE    = 1'b1,
  parameter int unsigned  CELL_N        = NAND_N,
  localparam int unsigned AW            = $clog2(ROWS),
  localparam int unsigned PAIRS         = (WIDTH + 2) / 3,
  localparam int unsigned CELLS         = (CELL_N == 4) ? WIDTH / BITS_PER_CELL : 2 * PAIRS,
  localparam int unsigned DW            = (CELL_N == 4) ? WIDTH : 3 * PAIRS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [RD_PORTS-1:0]                rd_en,
  input  logic [RD_PORTS-1:0][AW-1:0]        rd_addr,
  output logic [RD_PORTS-1:0][WIDTH-1:0]     rd_data,
  output logic [RD_PORTS-1:0]                rd_err,
  input  logic [WR_PORTS-1:0]                wr_en,
  input  logic [WR_PORTS-1:0][AW-1:0]        wr_addr,
  input  logic [WR_PORTS-1:0][WIDTH-1:0]     wr_data,
  output logic                               stall,
  output bal_state_t                         bal_state
);

  if (CELL_N != 3 && CELL_N != 4) begin : g_bad_cell
    $error("nbti_rf: CELL_N must be 3 or 4");
  end

  // Reset pattern: data zero in state zero (BL4 low for 4-NAND, BL1 low for 3-NAND).
  localparam logic [CELL_N-1:0] RESET_BL = (CELL_N == 4) ? CELL_N'(CELL_RESET_BL) : CELL_N'(3'b110);

  // ---------------- balancing state ----------------
  bal_state_t     st, st_next;
  logic           sweep;
  logic [AW-1:0]  sweep_row;

  balance_ctrl #(.ROWS(ROWS), .PERIOD(ROTATE_PERIOD), .NSTATES(CELL_N)) u_bal (
    .clk     (clk),
    .rst_n   (rst_n),
    .st      (st),
    .st_next (st_next),
    .busy    (sweep),
    .row     (sweep_row),
    .done    ()
  );

  assign stall     = sweep;
  assign bal_state = st;

  // ---------------- array ports ----------------
  logic [RD_PORTS-1:0]                    a_rd_en;
  logic [RD_PORTS-1:0][AW-1:0]            a_rd_addr;
  logic [RD_PORTS-1:0][CELLS-1:0][CELL_N-1:0] a_rd_bl;
  logic [WR_PORTS-1:0]                    a_wr_en;
  logic [WR_PORTS-1:0][AW-1:0]            a_wr_addr;
  logic [WR_PORTS-1:0][CELLS-1:0][CELL_N-1:0] a_wr_bl;

  nand_cell_array #(
    .ROWS(ROWS), .COLS(CELLS), .N(CELL_N), .RP(RD_PORTS), .WP(WR_PORTS),
    .RESET_BL(RESET_BL)
  ) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_en   (a_rd_en),
    .rd_addr (a_rd_addr),
    .rd_bl   (a_rd_bl),
    .wr_en   (a_wr_en),
    .wr_addr (a_wr_addr),
    .wr_bl   (a_wr_bl)
  );

  // ---------------- read path: sense, rebuild, decode ----------------
  logic [RD_PORTS-1:0][CELLS-1:0][CELL_N-1:0] rd_bl_full;
  logic [RD_PORTS-1:0][DW-1:0]                rd_word;
  logic [RD_PORTS-1:0]                        rd_bad;

  for (genvar p = 0; p < RD_PORTS; p++) begin : g_rd
    if (SKIP_SENSE) begin : g_skip
      logic [CELLS-1:0][CELL_N-2:0] sensed;
      logic [CELLS-1:0]             deduced_low;
      always_comb begin
        for (int unsigned c = 0; c < CELLS; c++) sensed[c] = a_rd_bl[p][c][CELL_N-2:0];
      end
      bitline_recover #(.N(CELL_N), .CELLS(CELLS), .UNREAD(CELL_N - 1)) u_recover (
        .sensed      (sensed),
        .bl          (rd_bl_full[p]),
        .deduced_low (deduced_low)
      );
    end else begin : g_all
      assign rd_bl_full[p] = a_rd_bl[p];
    end

    if (CELL_N == 4) begin : g_dec4
      logic [CELLS-1:0] bad;
      nand4_decoder #(.CELLS(CELLS)) u_dec (
        .st   (st),
        .bl   (rd_bl_full[p]),
        .data (rd_word[p]),
        .bad  (bad)
      );
      assign rd_bad[p] = |bad;
    end else begin : g_dec3
      logic [PAIRS-1:0] bad;
      nand3_pair_decoder #(.PAIRS(PAIRS)) u_dec (
        .st   (st),
        .bl   (rd_bl_full[p]),
        .data (rd_word[p]),
        .bad  (bad)
      );
      assign rd_bad[p] = |bad;
    end

    assign rd_data[p] = rd_word[p][WIDTH-1:0];
    assign rd_err[p]  = a_rd_en[p] && rd_bad[p];
  end

  // ---------------- write path: encode ----------------
  logic [WR_PORTS-1:0][CELLS-1:0][CELL_N-1:0] wr_bl_ext;
  logic [CELLS-1:0][CELL_N-1:0]               sweep_bl;

  // Encoder k = 0..WR_PORTS-1 serves write port k in the current state;
  // encoder WR_PORTS re-encodes the word read on port 0 in the next state for
  // the rotation sweep.
  logic [WR_PORTS:0][DW-1:0]                enc_data;
  bal_state_t [WR_PORTS:0]                  enc_st;
  logic [WR_PORTS:0][CELLS-1:0][CELL_N-1:0] enc_bl;

  always_comb begin
    for (int unsigned p = 0; p < WR_PORTS; p++) begin
      enc_data[p] = DW'(wr_data[p]);
      enc_st[p]   = st;
    end
    enc_data[WR_PORTS] = rd_word[0];
    enc_st[WR_PORTS]   = st_next;
  end

  for (genvar p = 0; p <= WR_PORTS; p++) begin : g_enc
    if (CELL_N == 4) begin : g_enc4
      nand4_encoder #(.CELLS(CELLS)) u_enc (
        .st   (enc_st[p]),
        .data (enc_data[p]),
        .bl   (enc_bl[p])
      );
    end else begin : g_enc3
      nand3_pair_encoder #(.PAIRS(PAIRS)) u_enc (
        .st   (enc_st[p]),
        .data (enc_data[p]),
        .bl   (enc_bl[p])
      );
    end
  end

  assign wr_bl_ext = enc_bl[WR_PORTS-1:0];
  assign sweep_bl  = enc_bl[WR_PORTS];

  // ---------------- port steering ----------------
  always_comb begin
    a_rd_en   = sweep ? '0 : rd_en;
    a_rd_addr = rd_addr;
    a_wr_en   = sweep ? '0 : wr_en;
    a_wr_addr = wr_addr;
    a_wr_bl   = wr_bl_ext;
    if (sweep) begin
      a_rd_en[0]   = 1'b1;
      a_rd_addr[0] = sweep_row;
      a_wr_en[0]   = 1'b1;
      a_wr_addr[0] = sweep_row;
      a_wr_bl[0]   = sweep_bl;
    end
  end

  // A sweep must never read a corrupted row.
  assert property (@(posedge clk) disable iff (!rst_n) sweep |-> !rd_bad[0])
    else $error("nbti_rf: state rotation read an invalid cell pattern");

endmodule
