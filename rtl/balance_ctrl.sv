// Balancing-state controller for the 4-NAND register file.
//
// To give every NAND output of every cell a low level the same share of
// time, the data-to-bitline mapping state {ST2,ST1} must spend the same time
// in each of its four values. This controller holds the current state and,
// every PERIOD cycles, moves the whole array to the next state (s -> s+1 mod
// NSTATES; four states for 4-NAND cells, three for 3-NAND cells). Moving a row means reading it, decoding it in the old state, encoding it
// in the new one and writing it back, as is done for the inverted mode of
// conventional cells. The controller walks the rows one per cycle; while it
// does, `busy` is high, `row` names the row being moved, and the register file
// stalls its ports. When the last row has been moved, `st` advances and the
// period count restarts.
//
// Timing: `busy` rises after PERIOD idle cycles and stays high for exactly
// ROWS cycles; `st` changes on the edge that ends the last of them. The
// period, the one-row-per-cycle sweep and the stall are this design's
// choices; the document asks only that each state be held 25% of the time.
module balance_ctrl
  import nbti_rf_pkg::*;
#(
  parameter int unsigned  ROWS   = 256,
  parameter int unsigned  PERIOD = 65536,
  parameter int unsigned  NSTATES = 4,
  localparam int unsigned AW     = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output bal_state_t    st,
  output bal_state_t    st_next,
  output logic          busy,
  output logic [AW-1:0] row,
  output logic          done
);

  localparam int unsigned CW = $clog2(PERIOD + 1);

  logic [CW-1:0] idle_cnt;

  assign st_next = (st == bal_state_t'(NSTATES - 1)) ? '0 : st + 2'd1;
  assign done    = busy && (row == AW'(ROWS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= '0;
      busy     <= 1'b0;
      row      <= '0;
      idle_cnt <= '0;
    end else if (busy) begin
      if (done) begin
        busy     <= 1'b0;
        row      <= '0;
        st       <= st_next;
        idle_cnt <= '0;
      end else begin
        row <= row + 1'b1;
      end
    end else if (idle_cnt == CW'(PERIOD - 1)) begin
      busy <= 1'b1;
      row  <= '0;
    end else begin
      idle_cnt <= idle_cnt + 1'b1;
    end
  end

endmodule
