// Rebuilds the one bitline per cell that has no sense amplifier.
//
// With single-ended sensing each bitline needs its own sense amplifier, and
// one of them per cell can be left out: a stable cell shows exactly one low
// bitline, so if none of the sensed lines is low the unsensed one must be,
// and otherwise it is high. This module takes the N-1 sensed lines of each
// of CELLS cells and returns all N, with the unsensed line at index UNREAD
// (default the last one, BL4 of a 4-NAND cell; the choice of line is this
// design's). `deduced_low[c]` tells that the rebuilt line of cell c is the
// low one. Purely combinational.
module bitline_recover #(
  parameter int unsigned N      = 4,
  parameter int unsigned CELLS  = 16,
  parameter int unsigned UNREAD = N - 1
) (
  input  logic [CELLS-1:0][N-2:0] sensed,
  output logic [CELLS-1:0][N-1:0] bl,
  output logic [CELLS-1:0]        deduced_low
);

  always_comb begin
    for (int unsigned c = 0; c < CELLS; c++) begin
      int unsigned j;
      deduced_low[c] = &sensed[c];
      j = 0;
      for (int unsigned k = 0; k < N; k++) begin
        if (k == UNREAD) begin
          bl[c][k] = ~deduced_low[c];
        end else begin
          bl[c][k] = sensed[c][j];
          j++;
        end
      end
    end
  end

endmodule
