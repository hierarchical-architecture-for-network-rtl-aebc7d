// Self-checking test of the virtual-channel buffer bank.
// Three banks are exercised against queue models kept in the testbench:
//   u_l1   2-word queues, one word in and out (an L1 bank)
//   u_pack 8-word queues written one word at a time, read four at a time
//   u_unp  8-word queues written four words at a time, read one at a time
// Checked: per-queue order and independence, wrap-around, the one-cycle read
// latency, reads at an offset from the head, and the word counts.
module tb_vc_buffer_bank;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  typedef logic [1:0] q_t;

  // one set of port signals per bank
  logic             wr_en [3];
  q_t               wr_q  [3];
  logic [FLIT_W-1:0] wr_data [3];
  logic             rd_en [3];
  q_t               rd_q  [3];
  logic [OCC_W-1:0] rd_off [3];
  logic [FLIT_W-1:0] rd_data [3];
  logic             pop_en [3];
  q_t               pop_q [3];
  logic [OCC_W-1:0] pop_w [3];
  logic [OCC_W-1:0] cnt [3][NQ];

  vc_buffer_bank #(.QW(2), .WR_WORDS(1), .RD_WORDS(1)) u_l1 (
    .clk, .rst_n, .wr_en(wr_en[0]), .wr_q(wr_q[0]), .wr_data(wr_data[0]),
    .rd_en(rd_en[0]), .rd_q(rd_q[0]), .rd_off(rd_off[0]), .rd_data(rd_data[0]),
    .pop_en(pop_en[0]), .pop_q(pop_q[0]), .pop_words(pop_w[0]), .count(cnt[0]));
  vc_buffer_bank #(.QW(8), .WR_WORDS(1), .RD_WORDS(4)) u_pack (
    .clk, .rst_n, .wr_en(wr_en[1]), .wr_q(wr_q[1]), .wr_data(wr_data[1]),
    .rd_en(rd_en[1]), .rd_q(rd_q[1]), .rd_off(rd_off[1]), .rd_data(rd_data[1]),
    .pop_en(pop_en[1]), .pop_q(pop_q[1]), .pop_words(pop_w[1]), .count(cnt[1]));
  vc_buffer_bank #(.QW(8), .WR_WORDS(4), .RD_WORDS(1)) u_unp (
    .clk, .rst_n, .wr_en(wr_en[2]), .wr_q(wr_q[2]), .wr_data(wr_data[2]),
    .rd_en(rd_en[2]), .rd_q(rd_q[2]), .rd_off(rd_off[2]), .rd_data(rd_data[2]),
    .pop_en(pop_en[2]), .pop_q(pop_q[2]), .pop_words(pop_w[2]), .count(cnt[2]));

  int unsigned QWv [3] = '{2, 8, 8};
  int unsigned WRv [3] = '{1, 1, 4};
  int unsigned RDv [3] = '{1, 4, 1};

  // reference queues of words
  logic [WORD_W-1:0] model [3][NQ][$];
  logic [WORD_W-1:0] next_word = 32'h1000;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    for (int b = 0; b < 3; b++) begin
      wr_en[b] = 0; rd_en[b] = 0; pop_en[b] = 0;
      wr_q[b] = 0; rd_q[b] = 0; pop_q[b] = 0; rd_off[b] = 0; pop_w[b] = 0; wr_data[b] = 0;
    end
  endtask

  // one random cycle on every bank
  task automatic step();
    logic [FLIT_W-1:0] exp [3];
    logic              chk [3];
    int                popn [3];
    int                popq [3];
    for (int b = 0; b < 3; b++) begin
      int q, off;
      chk[b] = 0; popn[b] = 0; popq[b] = 0;
      // write when there is room
      q = $urandom_range(NQ-1);
      if ($urandom_range(1) == 1 && model[b][q].size() + WRv[b] <= QWv[b]) begin
        wr_en[b] = 1; wr_q[b] = q_t'(q); wr_data[b] = '0;
        for (int k = 0; k < WRv[b]; k++) begin
          wr_data[b][k*WORD_W +: WORD_W] = next_word;
          next_word++;
        end
      end
      // read at a random whole-flit offset
      q = $urandom_range(NQ-1);
      if (model[b][q].size() >= RDv[b]) begin
        off = RDv[b] * $urandom_range((model[b][q].size() / RDv[b]) - 1);
        rd_en[b] = 1; rd_q[b] = q_t'(q); rd_off[b] = OCC_W'(off);
        exp[b] = '0;
        for (int k = 0; k < RDv[b]; k++) exp[b][k*WORD_W +: WORD_W] = model[b][q][off+k];
        chk[b] = 1;
      end
      // pop a flit sometimes
      q = $urandom_range(NQ-1);
      if ($urandom_range(2) == 0 && model[b][q].size() >= RDv[b]) begin
        pop_en[b] = 1; pop_q[b] = q_t'(q); pop_w[b] = OCC_W'(RDv[b]);
        popn[b] = RDv[b]; popq[b] = q;
      end
    end
    @(posedge clk);
    #1;
    for (int b = 0; b < 3; b++) begin
      if (wr_en[b])
        for (int k = 0; k < WRv[b]; k++) model[b][wr_q[b]].push_back(wr_data[b][k*WORD_W +: WORD_W]);
      for (int k = 0; k < popn[b]; k++) void'(model[b][popq[b]].pop_front());
      if (chk[b]) begin
        checks++;
        if (rd_data[b] !== exp[b]) begin
          failures++;
          $display("FAIL bank %0d read: got %h expected %h", b, rd_data[b], exp[b]);
        end
      end
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (int'(cnt[b][q]) != model[b][q].size()) begin
          failures++;
          $display("FAIL bank %0d queue %0d count %0d expected %0d", b, q, cnt[b][q], model[b][q].size());
        end
      end
    end
    idle();
  endtask

  initial begin
    idle();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 3; b++)
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (cnt[b][q] != 0) begin failures++; $display("FAIL count after reset"); end
      end
    repeat (3000) step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
