// Self-checking test of balance_ctrl.
//
// With 8 rows and a 20-cycle period, checks that each sweep starts after
// exactly PERIOD idle cycles, visits rows 0..7 in order one per cycle, raises
// `done` on the last row only, and that the state then steps 0,1,2,3,0,...
// It also checks that over four full rotations every state is held for the
// same number of cycles.
module tb_balance_ctrl;
  import nbti_rf_pkg::*;

  localparam int unsigned ROWS = 8, PERIOD = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n;
  bal_state_t st, st_next;
  logic       busy, done;
  logic [2:0] row;

  int checks = 0, failures = 0;

  balance_ctrl #(.ROWS(ROWS), .PERIOD(PERIOD)) dut (
    .clk(clk), .rst_n(rst_n), .st(st), .st_next(st_next), .busy(busy), .row(row), .done(done));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (st=%0d busy=%b row=%0d)", what, st, busy, row);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held [4];
    foreach (held[s]) held[s] = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(st == 0 && !busy, "reset");
    for (int rot = 0; rot < 8; rot++) begin
      bal_state_t expected;
      expected = bal_state_t'(rot);
      for (int i = 0; i < PERIOD; i++) begin
        check(!busy && st == expected && st_next == expected + 2'd1, "idle phase");
        if (rot >= 4) held[st]++;
        @(posedge clk); #1;
      end
      for (int r = 0; r < ROWS; r++) begin
        check(busy && row == 3'(r) && st == expected, "sweep row order");
        check(done == (r == ROWS - 1), "done on the last row only");
        if (rot >= 4) held[st]++;
        @(posedge clk); #1;
      end
      check(!busy && st == expected + 2'd1, "state advanced after the sweep");
    end
    foreach (held[s]) check(held[s] == PERIOD + ROWS, "each state held equally long");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
