// Self-checking test of bitline_recover.
//
// For a 4-line cell and a 3-line cell, takes every valid one-low pattern,
// removes the unsensed line, and checks that the module rebuilds the full
// pattern and reports whether the rebuilt line is the low one.
module tb_bitline_recover;

  localparam int unsigned CELLS = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [CELLS-1:0][3:0] full4, bl4;
  logic [CELLS-1:0][2:0] sensed4;
  logic [CELLS-1:0]      ded4;

  logic [CELLS-1:0][2:0] full3, bl3;
  logic [CELLS-1:0][1:0] sensed3;
  logic [CELLS-1:0]      ded3;

  int checks = 0, failures = 0;

  bitline_recover #(.N(4), .CELLS(CELLS)) dut4 (.sensed(sensed4), .bl(bl4), .deduced_low(ded4));
  // Three-line cell with the first line unsensed.
  bitline_recover #(.N(3), .CELLS(CELLS), .UNREAD(0)) dut3 (.sensed(sensed3), .bl(bl3), .deduced_low(ded3));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int c = 0; c < CELLS; c++) begin
        int z4, z3;
        z4 = (n < 4) ? (n + c) % 4 : $urandom_range(0, 3);
        z3 = (n < 3) ? (n + c) % 3 : $urandom_range(0, 2);
        full4[c]   = ~(4'b0001 << z4);
        full3[c]   = ~(3'b001 << z3);
        sensed4[c] = full4[c][2:0];
        sensed3[c] = full3[c][2:1];
      end
      @(posedge clk);
      for (int c = 0; c < CELLS; c++) begin
        checks++;
        if (bl4[c] !== full4[c] || ded4[c] !== !full4[c][3]) begin
          failures++;
          $display("FAIL N=4 full=%b rebuilt=%b deduced_low=%b", full4[c], bl4[c], ded4[c]);
        end
        checks++;
        if (bl3[c] !== full3[c] || ded3[c] !== !full3[c][0]) begin
          failures++;
          $display("FAIL N=3 full=%b rebuilt=%b deduced_low=%b", full3[c], bl3[c], ded3[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
