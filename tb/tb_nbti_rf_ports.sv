// Port-count and cell-type sweep of nbti_rf.
//
// The register file is evaluated for 1 to 16 ports and for 4-NAND and 3-NAND
// cells. This test runs random traffic, checked against a word array, on:
//   - 4-NAND, 64 x 32 bits, 1 read + 1 write port (smallest split-port file);
//   - 4-NAND, 64 x 32 bits, 10 read + 6 write ports (16 ports);
//   - 3-NAND, 256 x 32 bits, 6 read + 3 write ports (the full-size file with
//     3-NAND cell pairs).
// Each run must also pass through at least one state-rotation stall.
module tb_nbti_rf_ports;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  int   c0, f0, s0, c1, f1, s1, c2, f2, s2;
  bit   d0, d1, d2;

  rf_traffic_check #(.ROWS(64), .RP(1), .WP(1), .CELL_N(4), .PERIOD(300), .CYCLES(2000)) u_p2 (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .stalls(s0), .finished(d0));
  rf_traffic_check #(.ROWS(64), .RP(10), .WP(6), .CELL_N(4), .PERIOD(300), .CYCLES(2000)) u_p16 (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .stalls(s1), .finished(d1));
  rf_traffic_check #(.ROWS(256), .RP(6), .WP(3), .CELL_N(3), .PERIOD(600), .CYCLES(2000)) u_n3 (
    .clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .stalls(s2), .finished(d2));

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d0 && d1 && d2);
    $display("1R1W: %0d checks, %0d stall cycles; 10R6W: %0d checks, %0d stall cycles; 3-NAND 256x32: %0d checks, %0d stall cycles",
             c0, s0, c1, s1, c2, s2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
