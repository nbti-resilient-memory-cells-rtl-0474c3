// Self-checking test of nand4_encoder.
//
// Drives every balancing state with random words and compares each cell's
// bitlines with the 16-row mapping table written out below, and the BL4
// line with the closed form BL4 = (ST1 xor B1) | (ST2 xor B2). It also checks
// that over the four states every value puts its low line on each bitline
// exactly once (the 25% balance).
module tb_nand4_encoder;
  import nbti_rf_pkg::*;

  localparam int unsigned CELLS = 16;

  // Index {ST2,ST1,B2,B1} -> {BL4,BL3,BL2,BL1}.
  localparam logic [3:0] MAP [16] = '{
    4'b0111, 4'b1011, 4'b1101, 4'b1110,
    4'b1110, 4'b0111, 4'b1011, 4'b1101,
    4'b1101, 4'b1110, 4'b0111, 4'b1011,
    4'b1011, 4'b1101, 4'b1110, 4'b0111
  };

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bal_state_t                   st;
  logic [2*CELLS-1:0]           data;
  logic [CELLS-1:0][NAND_N-1:0] bl;

  int checks = 0, failures = 0;

  nand4_encoder #(.CELLS(CELLS)) dut (.st(st), .data(data), .bl(bl));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int low_count [4][4];   // [value][bitline]
    foreach (low_count[v, k]) low_count[v][k] = 0;

    for (int s = 0; s < 4; s++) begin
      for (int n = 0; n < 64; n++) begin
        st   = bal_state_t'(s);
        data = $urandom();
        if (n < 4) data = {CELLS{2'(n)}};
        @(posedge clk);
        for (int c = 0; c < CELLS; c++) begin
          logic [1:0] v;
          logic       bl4;
          v   = data[2*c +: 2];
          bl4 = (st[0] ^ v[0]) | (st[1] ^ v[1]);
          checks++;
          if (bl[c] !== MAP[{st, v}]) begin
            failures++;
            $display("FAIL st=%0d v=%0d bl=%b expected %b", st, v, bl[c], MAP[{st, v}]);
          end
          checks++;
          if (bl[c][3] !== bl4) failures++;
          if (n < 4 && c == 0) begin
            for (int k = 0; k < 4; k++) if (!bl[c][k]) low_count[v][k]++;
          end
        end
      end
    end
    foreach (low_count[v, k]) begin
      checks++;
      if (low_count[v][k] != 1) begin
        failures++;
        $display("FAIL value %0d low on BL%0d %0d times over the four states", v, k + 1, low_count[v][k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
