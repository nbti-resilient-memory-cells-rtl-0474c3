// Write-side encoder for a word of 3-NAND cell pairs.
//
// A 3-NAND cell has three states (one of its three outputs low), so a pair of
// cells has nine and can hold three data bits. Value v (0..7) is split into
// two base-3 digits, hi = v / 3 and lo = v % 3; each digit is shifted by the
// balancing state s (0..2) modulo 3 and selects the low bitline of its cell:
// digit 0 -> BL1 low, 1 -> BL2, 2 -> BL3. As s steps through 0, 1, 2 every
// digit visits every bitline once, so each NAND output is low a third of the
// time whatever the data.
//
// The document states only that a pair of 3-NAND cells stores three bits in
// its nine states and that the cells should reach the 1/N balance; the digit
// split, the rotation by s and the bit order (pair i takes data bits
// [3i+2:3i], cell 2i the low digit, cell 2i+1 the high digit) are this
// design's. The ninth pair state (hi = lo = 2) is never written. Purely
// combinational.
module nand3_pair_encoder #(
  parameter int unsigned PAIRS = 11
) (
  input  logic [1:0]                 st,
  input  logic [3*PAIRS-1:0]         data,
  output logic [2*PAIRS-1:0][2:0]    bl
);

  // (digit + s) mod 3 for digit, s in 0..2.
  function automatic logic [1:0] add3(input logic [1:0] a, input logic [1:0] b);
    logic [2:0] sum;
    sum = {1'b0, a} + {1'b0, b};
    return (sum >= 3'd3) ? 2'(sum - 3'd3) : sum[1:0];
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < PAIRS; i++) begin
      logic [2:0] v;
      logic [1:0] hi, lo;
      v  = data[3*i +: 3];
      hi = (v >= 3'd6) ? 2'd2 : (v >= 3'd3) ? 2'd1 : 2'd0;
      lo = 2'(v - 3'(hi) * 3'd3);
      bl[2*i]     = ~(3'b001 << add3(lo, st));
      bl[2*i + 1] = ~(3'b001 << add3(hi, st));
    end
  end

endmodule
