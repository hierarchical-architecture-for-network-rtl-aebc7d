// Self-checking test of the weighted round-robin scheduler.
// 1. Weights A=1, B=2, C=2, D=1, all requesting: the grant sequence must be
//    A B B C C D, repeated (shares 1/6, 1/3, 1/3, 1/6).
// 2. Only A, C and D requesting: B is skipped in the same cycle.
// 3. en low: no state change.
// 4. Burst scheduling (STEP = 3) with weights 3 and 6: A B B A B B.
module tb_wrr_scheduler;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]       req;
  logic             en;
  logic [WGT_W-1:0] w4 [4];
  logic             gv;
  logic [1:0]       gi;

  wrr_scheduler #(.N(4), .STEP(1)) dut (
    .clk, .rst_n, .en, .req, .weight(w4), .gnt_valid(gv), .gnt_idx(gi)
  );

  logic [1:0]       req2;
  logic [WGT_W-1:0] w2 [2];
  logic             gv2;
  logic [0:0]       gi2;

  wrr_scheduler #(.N(2), .STEP(3)) dut2 (
    .clk, .rst_n, .en(1'b1), .req(req2), .weight(w2), .gnt_valid(gv2), .gnt_idx(gi2)
  );

  task automatic expect_gnt(input int exp, input string what);
    checks++;
    if (!gv || int'(gi) != exp) begin
      failures++;
      $display("FAIL %s: got valid=%0d idx=%0d, expected %0d", what, gv, gi, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq1 [12] = '{0,1,1,2,2,3, 0,1,1,2,2,3};
    int seq2 [8]  = '{0,2,2,3, 0,2,2,3};
    int seq3 [6]  = '{0,1,1, 0,1,1};
    int cnt [4];
    w4 = '{4'd1, 4'd2, 4'd2, 4'd1};
    w2 = '{4'd3, 4'd6};
    req = '0; req2 = '0; en = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1: worked example of the scheme
    req = 4'b1111; en = 1'b1;
    cnt = '{default: 0};
    for (int k = 0; k < 12; k++) begin
      #1 expect_gnt(seq1[k], $sformatf("all-request step %0d", k));
      cnt[gi]++;
      @(negedge clk);
    end
    checks++;
    if (cnt[0] != 2 || cnt[1] != 4 || cnt[2] != 4 || cnt[3] != 2) begin
      failures++; $display("FAIL bandwidth shares %0d %0d %0d %0d", cnt[0], cnt[1], cnt[2], cnt[3]);
    end

    // 3: en low keeps the state (index back at A after two full rounds)
    en = 1'b0;
    repeat (3) @(negedge clk);
    #1 expect_gnt(0, "hold with en low");
    en = 1'b1;

    // 2: B not requesting
    req = 4'b1101;
    for (int k = 0; k < 8; k++) begin
      #1 expect_gnt(seq2[k], $sformatf("skip step %0d", k));
      @(negedge clk);
    end

    // no request at all
    req = 4'b0000;
    #1 checks++;
    if (gv) begin failures++; $display("FAIL grant without request"); end
    @(negedge clk);

    // single requester keeps the channel whatever its weight
    req = 4'b1000;
    for (int k = 0; k < 4; k++) begin
      #1 expect_gnt(3, "single requester");
      @(negedge clk);
    end
    req = '0;

    // 4: bursts of three on an L2 channel
    req2 = 2'b11;
    for (int k = 0; k < 6; k++) begin
      #1 checks++;
      if (!gv2 || int'(gi2) != seq3[k]) begin
        failures++; $display("FAIL burst step %0d: got %0d", k, gi2);
      end
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
