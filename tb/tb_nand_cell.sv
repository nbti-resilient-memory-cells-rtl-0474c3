// Self-checking test of nand_cell.
//
// A 4-NAND cell with two read and two write ports, and a 3-NAND and a 2-NAND
// cell (the 2-NAND cell is a plain cross-coupled inverter pair) with one of
// each. Checks the reset state, that every valid state can be written
// through every write port and is then seen as exactly one pulled-down
// bitline on every selected read port, that an unselected read port pulls
// nothing, that the cell holds its value with no wordline high, that port 0
// wins a simultaneous write, and that every stored state is a fixed point of
// the NAND ring (each output equals the NAND of all the other outputs),
// evaluated here independently of the cell.
module tb_nand_cell;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n;
  logic [1:0]       wr_wl;
  logic [1:0][3:0]  wr_bl;
  logic [1:0]       rd_wl;
  logic [1:0][3:0]  rd_pull;
  logic [3:0]       q;

  logic             wr_wl3, rd_wl3;
  logic [2:0]       wr_bl3, rd_pull3, q3;

  logic             wr_wl2, rd_wl2;
  logic [1:0]       wr_bl2, rd_pull2, q2;

  int checks = 0, failures = 0;

  nand_cell #(.N(4), .RP(2), .WP(2)) dut (
    .clk(clk), .rst_n(rst_n), .wr_wl(wr_wl), .wr_bl(wr_bl),
    .rd_wl(rd_wl), .rd_pull(rd_pull), .q(q));

  nand_cell #(.N(3), .RP(1), .WP(1)) dut3 (
    .clk(clk), .rst_n(rst_n), .wr_wl(wr_wl3), .wr_bl(wr_bl3),
    .rd_wl(rd_wl3), .rd_pull(rd_pull3), .q(q3));

  nand_cell #(.N(2), .RP(1), .WP(1)) dut2 (
    .clk(clk), .rst_n(rst_n), .wr_wl(wr_wl2), .wr_bl(wr_bl2),
    .rd_wl(rd_wl2), .rd_pull(rd_pull2), .q(q2));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (q=%b rd_pull=%b q3=%b)", what, q, rd_pull, q3);
    end
  endtask

  function automatic bit ring_stable(input logic [3:0] v, input int n);
    for (int k = 0; k < n; k++) begin
      logic all_others_high;
      all_others_high = 1'b1;
      for (int j = 0; j < n; j++) if (j != k && !v[j]) all_others_high = 1'b0;
      if (v[k] != !all_others_high) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_wl = '0; wr_bl = '1; rd_wl = '0;
    wr_wl3 = 1'b0; wr_bl3 = '1; rd_wl3 = 1'b0;
    wr_wl2 = 1'b0; wr_bl2 = '1; rd_wl2 = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(q == 4'b0111, "reset state of 4-NAND cell");
    check(q3 == 3'b011, "reset state of 3-NAND cell");

    for (int n = 0; n < 64; n++) begin
      int z, p;
      logic [3:0] pat;
      z   = (n < 8) ? n % 4 : $urandom_range(0, 3);
      p   = (n < 8) ? n / 4 : $urandom_range(0, 1);
      pat = ~(4'b0001 << z);
      wr_wl = '0; wr_wl[p] = 1'b1; wr_bl[p] = pat; wr_bl[1-p] = 4'b0000;
      @(posedge clk); #1;
      wr_wl = '0;
      check(q == pat, "written state stored");
      check(ring_stable(q, 4), "stored state is a NAND-ring fixed point");
      rd_wl = 2'b01; #1;
      check(rd_pull[0] == ~pat && rd_pull[1] == 4'b0000, "read port 0 pulls the low line only");
      rd_wl = 2'b11; #1;
      check(rd_pull[0] == ~pat && rd_pull[1] == ~pat, "both read ports see the state");
      rd_wl = 2'b00;
      @(posedge clk); #1;
      check(q == pat, "cell holds with wordlines low");
      // 3-NAND cell.
      wr_wl3 = 1'b1; wr_bl3 = ~(3'b001 << (n % 3));
      @(posedge clk); #1;
      wr_wl3 = 1'b0; rd_wl3 = 1'b1; #1;
      check(q3 == ~(3'b001 << (n % 3)) && rd_pull3 == (3'b001 << (n % 3)), "3-NAND cell write and read");
      check(ring_stable({1'b1, q3}, 3), "3-NAND state is a ring fixed point");
      rd_wl3 = 1'b0;
      // 2-NAND cell: the two outputs are complements, like an inverter pair.
      wr_wl2 = 1'b1; wr_bl2 = (n % 2 == 0) ? 2'b01 : 2'b10;
      @(posedge clk); #1;
      wr_wl2 = 1'b0; rd_wl2 = 1'b1; #1;
      check(q2 == ((n % 2 == 0) ? 2'b01 : 2'b10) && rd_pull2 == ~q2 && q2[0] == !q2[1],
            "2-NAND cell behaves as an inverter pair");
      check(ring_stable({2'b11, q2}, 2), "2-NAND state is a ring fixed point");
      rd_wl2 = 1'b0;
    end

    // Simultaneous write: port 0 wins.
    wr_wl = 2'b11; wr_bl[0] = 4'b1101; wr_bl[1] = 4'b1011;
    @(posedge clk); #1;
    wr_wl = '0;
    check(q == 4'b1101, "port 0 has priority");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
