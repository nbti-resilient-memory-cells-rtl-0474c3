// Self-checking test of nand3_pair_encoder and nand3_pair_decoder.
//
// For every balancing state and every 3-bit value, checks the two cells'
// bitlines against the base-3 digits worked out here, checks that the decoder
// returns the value, that every value visits each bitline of each cell once
// over the three states (the one-third balance), and that invalid patterns
// and the unused ninth state are flagged.
module tb_nand3_pair_codec;

  localparam int unsigned PAIRS = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]              st;
  logic [3*PAIRS-1:0]      data, data_out;
  logic [2*PAIRS-1:0][2:0] bl, bl_in;
  logic [PAIRS-1:0]        bad;

  int checks = 0, failures = 0;

  nand3_pair_encoder #(.PAIRS(PAIRS)) u_enc (.st(st), .data(data), .bl(bl));
  nand3_pair_decoder #(.PAIRS(PAIRS)) u_dec (.st(st), .bl(bl_in), .data(data_out), .bad(bad));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int visits [8][2][3];   // [value][cell][bitline]
    foreach (visits[v, c, k]) visits[v][c][k] = 0;
    for (int s = 0; s < 3; s++) begin
      for (int n = 0; n < 40; n++) begin
        st = 2'(s);
        for (int i = 0; i < PAIRS; i++) data[3*i +: 3] = (n < 8) ? 3'(n + i) : 3'($urandom());
        #1 bl_in = bl;
        @(posedge clk);
        for (int i = 0; i < PAIRS; i++) begin
          int v, lo, hi;
          logic [2:0] e_lo, e_hi;
          v  = int'(data[3*i +: 3]);
          lo = (v % 3 + s) % 3;
          hi = (v / 3 + s) % 3;
          e_lo = ~(3'b001 << lo);
          e_hi = ~(3'b001 << hi);
          checks++;
          if (bl[2*i] !== e_lo || bl[2*i+1] !== e_hi) begin
            failures++;
            $display("FAIL encode s=%0d v=%0d bl=%b/%b expected %b/%b", s, v, bl[2*i+1], bl[2*i], e_hi, e_lo);
          end
          checks++;
          if (data_out[3*i +: 3] !== 3'(v) || bad[i]) begin
            failures++;
            $display("FAIL decode s=%0d v=%0d got %0d bad=%b", s, v, data_out[3*i +: 3], bad[i]);
          end
          if (n < 8 && i == 0) begin
            visits[v][0][lo]++;
            visits[v][1][hi]++;
          end
        end
      end
    end
    foreach (visits[v, c, k]) begin
      checks++;
      if (visits[v][c][k] != 1) begin
        failures++;
        $display("FAIL value %0d cell %0d low on BL%0d %0d times", v, c, k + 1, visits[v][c][k]);
      end
    end
    // Invalid patterns: no low line, two low lines, ninth state (both digits 2 in state 0).
    st = 2'd0;
    bl_in = '1;
    bl_in[2] = 3'b011; bl_in[3] = 3'b011;   // pair 1: ninth state
    bl_in[4] = 3'b100; bl_in[5] = 3'b110;   // pair 2: two low lines
    bl_in[6] = 3'b110; bl_in[7] = 3'b101;   // pair 3: valid, value 3
    @(posedge clk);
    checks++;
    if (bad !== 4'b0111 || data_out[9 +: 3] !== 3'd3) begin
      failures++;
      $display("FAIL invalid patterns: bad=%b", bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
