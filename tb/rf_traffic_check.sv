// Testbench helper: drives one nbti_rf instance with random reads and writes
// on all of its ports for CYCLES cycles, checks every read that is not
// stalled against a plain word array, and reports its counts when `finished`
// rises. Used by tb_nbti_rf_ports to run several port counts and cell types
// side by side.
module rf_traffic_check #(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned RP     = 1,
  parameter int unsigned WP     = 1,
  parameter int unsigned CELL_N = 4,
  parameter int unsigned PERIOD = 300,
  parameter int unsigned CYCLES = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output bit   finished
);
  localparam int unsigned AW = $clog2(ROWS);

  logic [RP-1:0]            rd_en;
  logic [RP-1:0][AW-1:0]    rd_addr;
  logic [RP-1:0][WIDTH-1:0] rd_data;
  logic [RP-1:0]            rd_err;
  logic [WP-1:0]            wr_en;
  logic [WP-1:0][AW-1:0]    wr_addr;
  logic [WP-1:0][WIDTH-1:0] wr_data;
  logic                     stall;
  logic [1:0]               bal_state;

  logic [WIDTH-1:0] model [ROWS];

  nbti_rf #(.ROWS(ROWS), .WIDTH(WIDTH), .RD_PORTS(RP), .WR_PORTS(WP),
            .ROTATE_PERIOD(PERIOD), .CELL_N(CELL_N)) dut (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .rd_err(rd_err), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .stall(stall), .bal_state(bal_state));

  initial begin
    checks = 0; failures = 0; stalls = 0; finished = 1'b0;
    rd_en = '0; rd_addr = '0; wr_en = '0; wr_addr = '0; wr_data = '0;
    for (int r = 0; r < ROWS; r++) model[r] = '0;
    @(posedge rst_n);
    @(posedge clk); #1;
    for (int n = 0; n < CYCLES; n++) begin
      rd_en = RP'($urandom());
      for (int p = 0; p < RP; p++) rd_addr[p] = AW'($urandom());
      wr_en = WP'($urandom());
      for (int p = 0; p < WP; p++) begin
        wr_addr[p] = AW'($urandom());
        wr_data[p] = WIDTH'({$urandom(), $urandom()});
      end
      #1;
      if (stall) begin
        stalls++;
      end else begin
        for (int p = 0; p < RP; p++) begin
          if (rd_en[p]) begin
            checks++;
            if (rd_data[p] != model[rd_addr[p]] || rd_err[p]) begin
              failures++;
              if (failures < 10)
                $display("FAIL %0dR%0dW CELL_N=%0d port %0d row %0d read %h expected %h",
                         RP, WP, CELL_N, p, rd_addr[p], rd_data[p], model[rd_addr[p]]);
            end
          end
        end
      end
      @(posedge clk);
      if (!stall) for (int p = WP - 1; p >= 0; p--) if (wr_en[p]) model[wr_addr[p]] = wr_data[p];
      #1;
    end
    checks++;
    if (stalls == 0) failures++;
    finished = 1'b1;
  end
endmodule
