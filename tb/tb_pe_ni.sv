// Self-checking test of the PE network interface. Two interfaces are joined
// back to back (each one's sending channel is the other's receiving channel),
// which is the same channel a PE has to its local switch. Interface A sends
// four connections, source queue q to sink queue 3-q of B, with weights
// 1..4; B sends one connection back to A. The receiving processors pop
// slowly so that transfers get refused and repeated. Checked: every word
// arrives once and in order in the right sink queue, rx_valid follows a pop
// of a non-empty queue by one cycle, a write into a full source queue is
// dropped, and refusals occur. Queue 2 of B has no connection and
// must keep its data.
module tb_pe_ni;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int WORDS = 40;

  logic             tx_we [2];
  logic [1:0]       tx_q [2];
  logic [WORD_W-1:0] tx_data [2];
  logic [OCC_W-1:0] tx_count [2][NQ];
  logic             rx_pop [2];
  logic [1:0]       rx_q [2];
  logic             rx_valid [2];
  logic [WORD_W-1:0] rx_data [2];
  logic [OCC_W-1:0] rx_count [2][NQ];
  link_fwd_t        fwd [2];
  logic             ack [2];
  logic             cfg_we [2];
  logic [1:0]       cfg_q;
  map_entry_t       cfg_entry;
  logic [CNT_W-1:0] txn [2], fail [2];

  for (genvar n = 0; n < 2; n++) begin : g_ni
    pe_ni dut (
      .clk, .rst_n,
      .tx_we(tx_we[n]), .tx_q(tx_q[n]), .tx_data(tx_data[n]), .tx_count(tx_count[n]),
      .rx_pop(rx_pop[n]), .rx_q(rx_q[n]), .rx_valid(rx_valid[n]), .rx_data(rx_data[n]),
      .rx_count(rx_count[n]),
      .out_fwd(fwd[n]), .out_ack(ack[1-n]), .in_fwd(fwd[1-n]), .in_ack(ack[n]),
      .cfg_we(cfg_we[n]), .cfg_q(cfg_q), .cfg_entry(cfg_entry),
      .txn_cnt(txn[n]), .fail_cnt(fail[n]));
  end

  function automatic logic [WORD_W-1:0] word_of(int src, int q, int n);
    return {4'(src), 4'(q), 24'(n)};
  endfunction

  int sent [2][NQ], got [2][NQ];
  int total_a, total_b;

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2; n++) begin
      tx_we[n] = 0; tx_q[n] = 0; tx_data[n] = 0; rx_pop[n] = 0; rx_q[n] = 0; cfg_we[n] = 0;
      for (int q = 0; q < NQ; q++) begin sent[n][q] = 0; got[n][q] = 0; end
    end
    cfg_q = 0; cfg_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int q = 0; q < NQ; q++) begin
      cfg_we[0] = 1; cfg_q = 2'(q);
      cfg_entry = '{valid: 1'b1, dport: P_L, dq: 2'(3 - q), weight: WGT_W'(q + 1)};
      @(negedge clk);
    end
    cfg_we[0] = 0;
    cfg_we[1] = 1; cfg_q = 0; cfg_entry = '{valid: 1'b1, dport: P_L, dq: 2'd1, weight: 4'd1};
    @(negedge clk);
    cfg_we[1] = 0;

    // overfill source queue 2 of B, which has no connection: nine writes
    // into an 8-word queue leave eight words
    for (int k = 0; k < 9; k++) begin
      tx_we[1] = 1; tx_q[1] = 2; tx_data[1] = 32'hdead0000 + k;
      @(negedge clk);
    end
    tx_we[1] = 0;
    checks++;
    if (tx_count[1][2] != 8) begin
      failures++; $display("FAIL full source queue holds %0d words", tx_count[1][2]);
    end

    // random traffic until everything arrived
    while (total_a < WORDS * NQ || total_b < WORDS) begin
      int q;
      logic [1:0] popq [2];
      logic       popped [2];
      // senders
      q = $urandom_range(NQ - 1);
      tx_we[0] = 0;
      if (sent[0][q] < WORDS && int'(tx_count[0][q]) < 8 && $urandom_range(1)) begin
        tx_we[0] = 1; tx_q[0] = 2'(q); tx_data[0] = word_of(0, q, sent[0][q]); sent[0][q]++;
      end
      tx_we[1] = 0;
      if (sent[1][0] < WORDS && int'(tx_count[1][0]) < 8 && $urandom_range(1)) begin
        tx_we[1] = 1; tx_q[1] = 0; tx_data[1] = word_of(1, 0, sent[1][0]); sent[1][0]++;
      end
      // receivers, slow
      for (int n = 0; n < 2; n++) begin
        rx_pop[n] = ($urandom_range(2) == 0);
        rx_q[n] = 2'($urandom_range(NQ - 1));
        popq[n] = rx_q[n];
        popped[n] = rx_pop[n] && rx_count[n][rx_q[n]] != 0;
      end
      @(negedge clk);
      for (int n = 0; n < 2; n++) begin
        checks++;
        if (rx_valid[n] !== popped[n]) begin
          failures++; $display("FAIL rx_valid of %0d", n);
        end
        if (popped[n]) begin
          int src_q;
          src_q = (n == 1) ? 3 - int'(popq[n]) : 0;
          checks++;
          if (n == 0 && popq[n] != 1) begin
            failures++; $display("FAIL data in an unused sink queue of A");
          end else if (rx_data[n] !== word_of(1 - n, src_q, got[n][src_q])) begin
            failures++;
            $display("FAIL NI %0d queue %0d word %0d: got %h", n, popq[n], got[n][src_q], rx_data[n]);
          end
          got[n][src_q]++;
          if (n == 1) total_a++; else total_b++;
        end
      end
    end
    rx_pop[0] = 0; rx_pop[1] = 0; tx_we[0] = 0; tx_we[1] = 0;
    checks++;
    if (fail[0] == 0) begin failures++; $display("FAIL no refusal seen"); end
    checks++;
    if (txn[0] - fail[0] != CNT_W'(WORDS * NQ) || txn[1] - fail[1] != CNT_W'(WORDS)) begin
      failures++; $display("FAIL transfer counts %0d %0d", txn[0] - fail[0], txn[1] - fail[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
