// Read-side decoder for a word of 3-NAND cell pairs.
//
// Inverse of nand3_pair_encoder: the low bitline of each cell gives a shifted
// digit (BL1 low -> 0, BL2 -> 1, BL3 -> 2), the balancing state s is
// subtracted modulo 3, and the pair's value is 3*hi + lo. `bad[i]` flags pair
// i when a cell does not show exactly one low line or the pair holds the
// unused ninth state. Purely combinational.
module nand3_pair_decoder #(
  parameter int unsigned PAIRS = 11
) (
  input  logic [1:0]                 st,
  input  logic [2*PAIRS-1:0][2:0]    bl,
  output logic [3*PAIRS-1:0]         data,
  output logic [PAIRS-1:0]           bad
);

  // Position of the low line, and whether there is exactly one.
  function automatic logic [1:0] low_pos(input logic [2:0] b);
    return !b[0] ? 2'd0 : !b[1] ? 2'd1 : 2'd2;
  endfunction

  // (digit - s) mod 3 for digit, s in 0..2.
  function automatic logic [1:0] sub3(input logic [1:0] a, input logic [1:0] b);
    return (a >= b) ? 2'(a - b) : 2'(a + 2'd3 - b);
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < PAIRS; i++) begin
      logic [1:0] lo, hi;
      logic [3:0] v;
      lo = sub3(low_pos(bl[2*i]), st);
      hi = sub3(low_pos(bl[2*i + 1]), st);
      v  = 4'(hi) * 4'd3 + 4'(lo);
      data[3*i +: 3] = v[2:0];
      bad[i] = ($countones(~bl[2*i]) != 1) || ($countones(~bl[2*i + 1]) != 1) || v[3];
    end
  end

endmodule
