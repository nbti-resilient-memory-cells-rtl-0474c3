// Self-checking test of nand_cell_array.
//
// An 8-row, 3-column array of 4-NAND cells with two read and two write
// ports. Random one-low patterns are written through both write ports and
// every read port is compared each cycle with a plain array model. Also
// checks the reset contents, that a disabled read port reads all ones
// (precharged bitlines), that a read in the write cycle returns old data and
// that write port 0 wins when both ports write one row.
module tb_nand_cell_array;

  localparam int unsigned ROWS = 8, COLS = 3, N = 4, RP = 2, WP = 2, AW = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                           rst_n;
  logic [RP-1:0]                  rd_en;
  logic [RP-1:0][AW-1:0]          rd_addr;
  logic [RP-1:0][COLS-1:0][N-1:0] rd_bl;
  logic [WP-1:0]                  wr_en;
  logic [WP-1:0][AW-1:0]          wr_addr;
  logic [WP-1:0][COLS-1:0][N-1:0] wr_bl;

  logic [COLS-1:0][N-1:0] model [ROWS];

  int checks = 0, failures = 0, conflicts = 0;

  nand_cell_array #(.ROWS(ROWS), .COLS(COLS), .N(N), .RP(RP), .WP(WP)) dut (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_addr(rd_addr), .rd_bl(rd_bl),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_bl(wr_bl));

  function automatic logic [COLS-1:0][N-1:0] rand_word();
    logic [COLS-1:0][N-1:0] w;
    for (int c = 0; c < COLS; c++) w[c] = ~(4'b0001 << $urandom_range(0, 3));
    return w;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; rd_en = '0; rd_addr = '0; wr_en = '0; wr_addr = '0; wr_bl = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) model[r] = {COLS{4'b0111}};
    for (int r = 0; r < ROWS; r++) begin
      rd_en = 2'b01; rd_addr[0] = AW'(r); #1;
      checks++;
      if (rd_bl[0] !== model[r] || rd_bl[1] !== '1) begin
        failures++;
        $display("FAIL reset row %0d reads %h", r, rd_bl[0]);
      end
    end

    for (int n = 0; n < 2000; n++) begin
      rd_en   = 2'($urandom());
      for (int p = 0; p < RP; p++) rd_addr[p] = AW'($urandom());
      wr_en   = 2'($urandom());
      for (int p = 0; p < WP; p++) begin
        wr_addr[p] = AW'($urandom());
        wr_bl[p]   = rand_word();
      end
      if (n % 50 == 0) begin
        wr_en = 2'b11; wr_addr[1] = wr_addr[0]; rd_en[0] = 1'b1; rd_addr[0] = wr_addr[0];
      end
      #1;
      for (int p = 0; p < RP; p++) begin
        checks++;
        if (rd_bl[p] !== (rd_en[p] ? model[rd_addr[p]] : '1)) begin
          failures++;
          $display("FAIL port %0d en=%b row %0d reads %h expected %h", p, rd_en[p], rd_addr[p],
                   rd_bl[p], model[rd_addr[p]]);
        end
      end
      @(posedge clk);
      if (wr_en == 2'b11 && wr_addr[0] == wr_addr[1]) conflicts++;
      for (int p = WP - 1; p >= 0; p--) if (wr_en[p]) model[wr_addr[p]] = wr_bl[p];
      #1;
    end
    checks++;
    if (conflicts == 0) begin
      failures++;
      $display("FAIL no write-write conflict was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
