// End-to-end test of nbti_rf at reduced size.
//
// 16 words of 8 bits, 3 read and 2 write ports, a rotation every 40 cycles.
// Random reads and writes on all ports are checked against a plain word
// array; a second instance that senses all four bitlines (no rebuilt line)
// runs on the same stimulus and must read the same data. Row 0 is written
// once and then left alone, and the time each NAND output of one of its cells
// spends low is measured over four whole rotations: it must be exactly a
// quarter for every output, the 1/N balance the design exists for. A third
// instance built from 3-NAND cell pairs (CELL_N = 3) runs on the same
// stimulus; its reads are checked against the same model and its cells'
// outputs must each be low exactly a third of three whole rotations.
//
// Mechanisms that must occur at least once: a stall by the state rotation, a
// completed rotation through all four states, a read whose low bitline was
// the unsensed one, a write-write conflict on one row, and a read of a row in
// the cycle it is written.
module tb_nbti_rf;
  import nbti_rf_pkg::*;

  localparam int unsigned ROWS = 16, WIDTH = 8, RP = 3, WP = 2, PERIOD = 40, AW = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n;
  logic [RP-1:0]              rd_en;
  logic [RP-1:0][AW-1:0]      rd_addr;
  logic [RP-1:0][WIDTH-1:0]   rd_data, rd_data_all;
  logic [RP-1:0]              rd_err, rd_err_all;
  logic [WP-1:0]              wr_en;
  logic [WP-1:0][AW-1:0]      wr_addr;
  logic [WP-1:0][WIDTH-1:0]   wr_data;
  logic                       stall, stall_all, stall3;
  bal_state_t                 bal_state, bal_state_all, bal_state3;
  logic [RP-1:0][WIDTH-1:0]   rd_data3;
  logic [RP-1:0]              rd_err3;

  logic [WIDTH-1:0] model [ROWS];

  int checks = 0, failures = 0;
  int n_stall = 0, n_rot = 0, n_deduced = 0, n_conflict = 0, n_rdwr = 0;

  nbti_rf #(.ROWS(ROWS), .WIDTH(WIDTH), .RD_PORTS(RP), .WR_PORTS(WP),
            .ROTATE_PERIOD(PERIOD), .SKIP_SENSE(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .rd_err(rd_err), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .stall(stall), .bal_state(bal_state));

  nbti_rf #(.ROWS(ROWS), .WIDTH(WIDTH), .RD_PORTS(RP), .WR_PORTS(WP),
            .ROTATE_PERIOD(PERIOD), .SKIP_SENSE(1'b0)) dut_all (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data_all),
    .rd_err(rd_err_all), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .stall(stall_all), .bal_state(bal_state_all));

  nbti_rf #(.ROWS(ROWS), .WIDTH(WIDTH), .RD_PORTS(RP), .WR_PORTS(WP),
            .ROTATE_PERIOD(PERIOD), .SKIP_SENSE(1'b1), .CELL_N(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data3),
    .rd_err(rd_err3), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .stall(stall3), .bal_state(bal_state3));

  // Gate outputs of cell 0 of row 0, in the 4-NAND and the 3-NAND instance.
  logic [3:0] watched_q;
  logic [2:0] watched_q3;
  assign watched_q  = dut.u_array.g_row[0].g_col[0].q;
  assign watched_q3 = dut3.u_array.g_row[0].g_col[1].q;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int low_cnt [4];
    int low_cnt3 [3];
    int window, window3, sweeps_seen;
    bit measuring, measuring3, prev_stall;
    bal_state_t prev_state;
    foreach (low_cnt[k]) low_cnt[k] = 0;
    foreach (low_cnt3[k]) low_cnt3[k] = 0;
    window3 = 0; measuring3 = 1'b0;
    window = 0; sweeps_seen = 0; measuring = 1'b0; prev_stall = 1'b0; prev_state = '0;

    rst_n = 1'b0; rd_en = '0; rd_addr = '0; wr_en = '0; wr_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) model[r] = '0;

    // Reset contents read as zero.
    for (int r = 0; r < ROWS; r++) begin
      rd_en = 3'b001; rd_addr[0] = AW'(r); #1;
      check(rd_data[0] == '0 && !rd_err[0], "reset word reads zero");
    end
    rd_en = '0;

    // Row 0: written once with a fixed value.
    wr_en = 2'b01; wr_addr[0] = '0; wr_data[0] = 8'hB4;
    @(posedge clk); #1;
    model[0] = 8'hB4;
    wr_en = '0;

    for (int n = 0; n < 3000; n++) begin
      rd_en = RP'($urandom());
      for (int p = 0; p < RP; p++) rd_addr[p] = AW'($urandom());
      wr_en = WP'($urandom());
      for (int p = 0; p < WP; p++) begin
        wr_addr[p] = AW'($urandom_range(1, ROWS - 1));
        wr_data[p] = WIDTH'($urandom());
      end
      if (n % 37 == 0) begin
        wr_en = 2'b11; wr_addr[1] = wr_addr[0];
      end
      if (n % 23 == 0) begin
        wr_en[0] = 1'b1; rd_en[1] = 1'b1; rd_addr[1] = wr_addr[0];
      end
      #1;
      if (stall) begin
        n_stall++;
      end else begin
        for (int p = 0; p < RP; p++) begin
          if (rd_en[p]) begin
            check(rd_data[p] == model[rd_addr[p]] && !rd_err[p], "read data matches model");
            check(rd_data_all[p] == rd_data[p] && !rd_err_all[p], "all-sensed instance agrees");
            check(rd_data3[p] == model[rd_addr[p]] && !rd_err3[p], "3-NAND instance read matches model");
            if (p == 0 && |dut.g_rd[0].g_skip.deduced_low) n_deduced++;
            if (wr_en[0] && rd_addr[p] == wr_addr[0]) n_rdwr++;
          end
        end
        if (wr_en == 2'b11 && wr_addr[0] == wr_addr[1]) n_conflict++;
      end
      check(stall == stall_all && bal_state == bal_state_all && stall == stall3, "instances rotate together");
      check(bal_state3 < 2'd3, "3-NAND state stays within three values");

      // Duty-cycle window: from the start of the second sweep, four rotations.
      if (stall && !prev_stall) begin
        sweeps_seen++;
        if (sweeps_seen == 2) measuring = 1'b1;
        if (sweeps_seen == 6) measuring = 1'b0;
        measuring3 = (sweeps_seen >= 2 && sweeps_seen < 5);
      end
      if (measuring) begin
        window++;
        for (int k = 0; k < 4; k++) if (!watched_q[k]) low_cnt[k]++;
      end
      if (measuring3) begin
        window3++;
        for (int k = 0; k < 3; k++) if (!watched_q3[k]) low_cnt3[k]++;
      end
      prev_stall = stall;

      @(posedge clk);
      if (!stall) begin
        for (int p = WP - 1; p >= 0; p--) if (wr_en[p]) model[wr_addr[p]] = wr_data[p];
      end
      #1;
      if (bal_state != prev_state) n_rot++;
      prev_state = bal_state;
    end

    check(sweeps_seen >= 6, "four whole rotations measured");
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (low_cnt[k] * 4 != window) begin
        failures++;
        $display("FAIL NAND%0d output low %0d of %0d cycles, expected a quarter", k + 1, low_cnt[k], window);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (low_cnt3[k] * 3 != window3) begin
        failures++;
        $display("FAIL 3-NAND: NAND%0d output low %0d of %0d cycles, expected a third", k + 1, low_cnt3[k], window3);
      end
    end
    $display("3-NAND window=%0d low=%0d/%0d/%0d", window3, low_cnt3[0], low_cnt3[1], low_cnt3[2]);
    $display("window=%0d low=%0d/%0d/%0d/%0d", window, low_cnt[0], low_cnt[1], low_cnt[2], low_cnt[3]);
    $display("stall cycles=%0d rotations=%0d deduced reads=%0d write conflicts=%0d read-during-write=%0d",
             n_stall, n_rot, n_deduced, n_conflict, n_rdwr);
    check(n_stall > 0, "stall occurred");
    check(n_rot >= 4, "state rotated through all four values");
    check(n_deduced > 0, "unsensed bitline was the low one");
    check(n_conflict > 0, "write-write conflict occurred");
    check(n_rdwr > 0, "read during write occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
