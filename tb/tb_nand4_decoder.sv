// Self-checking test of nand4_decoder.
//
// Feeds every valid one-low bitline pattern in every balancing state and
// checks the decoded bits against the mapping table written out below (the
// same table read backwards). Also feeds invalid patterns (no low line, two
// low lines) and checks that the cell is flagged bad.
module tb_nand4_decoder;
  import nbti_rf_pkg::*;

  localparam int unsigned CELLS = 4;

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
  logic [CELLS-1:0][NAND_N-1:0] bl;
  logic [2*CELLS-1:0]           data;
  logic [CELLS-1:0]             bad;

  int checks = 0, failures = 0;

  nand4_decoder #(.CELLS(CELLS)) dut (.st(st), .bl(bl), .data(data), .bad(bad));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*CELLS-1:0] exp_data;
    for (int s = 0; s < 4; s++) begin
      for (int n = 0; n < 64; n++) begin
        st = bal_state_t'(s);
        for (int c = 0; c < CELLS; c++) begin
          logic [1:0] v;
          v = 2'($urandom_range(0, 3));
          if (n < 4) v = 2'(n + c);
          exp_data[2*c +: 2] = v;
          bl[c] = MAP[{st, v}];
        end
        @(posedge clk);
        checks++;
        if (data !== exp_data || bad !== '0) begin
          failures++;
          $display("FAIL st=%0d bl=%h data=%h expected %h bad=%b", st, bl, data, exp_data, bad);
        end
      end
    end
    // Invalid patterns.
    bl = {4'b1111, 4'b0011, 4'b0111, 4'b0000};
    @(posedge clk);
    checks++;
    if (bad !== 4'b1101) begin
      failures++;
      $display("FAIL bad=%b expected 1101", bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
