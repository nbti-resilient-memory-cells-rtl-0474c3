// N-NAND storage cell with RP read ports and WP write ports.
//
// The cell is N NAND gates of N-1 inputs; the output of each gate drives one
// input of every other gate. The only stable states have exactly one output
// low (the gate whose inputs are all high), so the cell has N states. N = 2 is
// the ordinary pair of cross-coupled inverters; N = 4 stores two bits.
//
// In this model the N gate outputs are held in a register `q` (q[k-1] is the
// output of NAND k). The NAND ring itself is written out combinationally in
// `ring` and an assertion checks that the stored outputs are its fixed point,
// which is the same as saying exactly one output is low.
//
// Ports: every port has its own wordline and N bitlines, as in the
// single-ported drawings of the 3- and 4-NAND cells, where NAND k reaches
// Bitline k through a pass transistor gated by the wordline. A write port
// whose wordline is high overwrites the cell at the rising clock edge with
// its bitline pattern (lowest-numbered port wins if several write at once,
// a choice of this design). A read port whose wordline is high pulls low the
// bitline of the one NAND that outputs 0: `rd_pull[p][k]` is that pull-down,
// and the array wires the pull-downs of a column into a precharged bitline.
// Reads are combinational; a read in the same cycle as a write sees the old
// value. Synchronous active-low reset loads RESET_BL (a real cell powers up in
// an arbitrary state; the reset is this design's choice).
module nand_cell #(
  parameter int unsigned   N        = 4,
  parameter int unsigned   RP       = 1,
  parameter int unsigned   WP       = 1,
  parameter logic [N-1:0]  RESET_BL = {1'b0, {(N-1){1'b1}}}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [WP-1:0]        wr_wl,
  input  logic [WP-1:0][N-1:0] wr_bl,
  input  logic [RP-1:0]        rd_wl,
  output logic [RP-1:0][N-1:0] rd_pull,
  output logic [N-1:0]         q
);

  logic [N-1:0] ring;

  // NAND k takes the outputs of all other gates: ring[k] = ~&(q with bit k forced high).
  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      logic [N-1:0] ins;
      ins     = q;
      ins[k]  = 1'b1;
      ring[k] = ~&ins;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= RESET_BL;
    end else begin
      for (int p = int'(WP) - 1; p >= 0; p--) begin
        if (wr_wl[p]) q <= wr_bl[p];
      end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < RP; p++) begin
      rd_pull[p] = rd_wl[p] ? ~q : '0;
    end
  end

  // A written pattern must be a valid state: exactly one low bitline.
  for (genvar p = 0; p < WP; p++) begin : g_wr_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     wr_wl[p] |-> $countones(~wr_bl[p]) == 1)
      else $error("nand_cell: write port %0d drives an invalid bitline pattern", p);
  end

  // The stored outputs are a fixed point of the NAND ring.
  assert property (@(posedge clk) disable iff (!rst_n) ring == q)
    else $error("nand_cell: outputs are not a stable state of the NAND ring");

endmodule
