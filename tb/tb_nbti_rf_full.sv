// Full-size test of nbti_rf with every parameter at its default: 256 words of
// 32 bits, 6 read and 3 write ports, one state rotation every 65536 cycles.
//
// Fills all 256 words through the three write ports, then runs random reads
// and writes on all nine ports, checked against a plain word array, through
// one complete rotation of the balancing state (the 256-cycle stall included),
// and finally reads every word back in the new state.
module tb_nbti_rf_full;
  import nbti_rf_pkg::*;

  localparam int unsigned ROWS = 256, WIDTH = 32, RP = 6, WP = 3, AW = 8;
  localparam int unsigned CYCLES = 65536 + 256 + 600;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n;
  logic [RP-1:0]              rd_en;
  logic [RP-1:0][AW-1:0]      rd_addr;
  logic [RP-1:0][WIDTH-1:0]   rd_data;
  logic [RP-1:0]              rd_err;
  logic [WP-1:0]              wr_en;
  logic [WP-1:0][AW-1:0]      wr_addr;
  logic [WP-1:0][WIDTH-1:0]   wr_data;
  logic                       stall;
  bal_state_t                 bal_state;

  logic [WIDTH-1:0] model [ROWS];

  int checks = 0, failures = 0, n_stall = 0;

  nbti_rf dut (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .rd_err(rd_err), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .stall(stall), .bal_state(bal_state));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; rd_en = '0; rd_addr = '0; wr_en = '0; wr_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Fill every word, three per cycle.
    for (int r = 0; r < ROWS; r += WP) begin
      for (int p = 0; p < WP; p++) begin
        wr_en[p]   = (r + p < ROWS);
        wr_addr[p] = AW'(r + p);
        wr_data[p] = $urandom();
      end
      @(posedge clk);
      for (int p = 0; p < WP; p++) if (wr_en[p]) model[wr_addr[p]] = wr_data[p];
      #1;
    end

    for (int n = 0; n < CYCLES; n++) begin
      rd_en = RP'($urandom());
      for (int p = 0; p < RP; p++) rd_addr[p] = AW'($urandom());
      wr_en = (n % 8 == 0) ? WP'($urandom()) : '0;
      for (int p = 0; p < WP; p++) begin
        wr_addr[p] = AW'($urandom());
        wr_data[p] = $urandom();
      end
      #1;
      if (stall) begin
        n_stall++;
      end else begin
        for (int p = 0; p < RP; p++)
          if (rd_en[p]) check(rd_data[p] == model[rd_addr[p]] && !rd_err[p], "read data matches model");
      end
      @(posedge clk);
      if (!stall) for (int p = WP - 1; p >= 0; p--) if (wr_en[p]) model[wr_addr[p]] = wr_data[p];
      #1;
    end
    wr_en = '0;

    check(bal_state == 2'd1, "one rotation completed");
    check(n_stall == ROWS, "the rotation stalled the ports for one cycle per word");

    for (int r = 0; r < ROWS; r += RP) begin
      for (int p = 0; p < RP; p++) begin
        rd_en[p]   = (r + p < ROWS);
        rd_addr[p] = AW'(r + p);
      end
      #1;
      for (int p = 0; p < RP; p++)
        if (rd_en[p]) check(rd_data[p] == model[rd_addr[p]] && !rd_err[p], "final read-back");
      @(posedge clk); #1;
    end
    $display("stall cycles=%0d state=%0d", n_stall, bal_state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
