// Self-checking test of one L1 virtual-circuit switch with a PE interface on
// each of its five ports standing in for the neighbours.
// Connections (source interface, its queue) -> switch buffer -> sink queue:
//   C0: W q0 -> E-port bank W queue 1 -> E sink 0   weight 1
//   C1: L q0 -> E-port bank L queue 2 -> E sink 1   weight 2
//   C2: N q0 -> S-port bank N queue 0 -> S sink 2
//   C3: E q0 -> W-port bank E queue 3 -> W sink 3
//   C4: S q0 -> L-port bank S queue 0 -> L sink 0
// The switch is built with 8-word queues so that one channel can be kept
// busy. C0 and C1 share the E channel. Phase 1 keeps both backlogged with fast
// sinks and checks that the E channel is shared 1:2 as the weights say.
// Phase 2 runs random traffic with slow sinks, so buffers fill and transfers
// are refused; every word must arrive once, in order, at the right sink.
module tb_vc_switch;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NC = 5;
  localparam int WORDS = 60;
  // per connection: source port, sink port, sink queue, switch bank queue
  localparam int SRC [NC] = '{2, 4, 3, 0, 1};
  localparam int DST [NC] = '{0, 0, 1, 2, 4};
  localparam int SQ  [NC] = '{0, 1, 2, 3, 0};
  localparam int BQ  [NC] = '{1, 2, 0, 3, 0};
  localparam int WG  [NC] = '{1, 2, 1, 1, 1};

  link_fwd_t in_fwd [NPORT], out_fwd [NPORT];
  logic      in_ack [NPORT], out_ack [NPORT];
  logic      sw_cfg_we;
  port_e     cfg_out, cfg_bank;
  logic [1:0] cfg_q;
  map_entry_t cfg_entry;
  logic [CNT_W-1:0] txn [NPORT], fail [NPORT];

  vc_switch #(.QWORDS('{default: 8})) dut (
    .clk, .rst_n, .in_fwd, .in_ack, .out_fwd, .out_ack,
    .cfg_we(sw_cfg_we), .cfg_out, .cfg_bank, .cfg_q, .cfg_entry,
    .txn_cnt(txn), .fail_cnt(fail));

  logic             tx_we [NPORT];
  logic [1:0]       tx_q [NPORT];
  logic [WORD_W-1:0] tx_data [NPORT];
  logic [OCC_W-1:0] tx_count [NPORT][NQ];
  logic             rx_pop [NPORT];
  logic [1:0]       rx_q [NPORT];
  logic             rx_valid [NPORT];
  logic [WORD_W-1:0] rx_data [NPORT];
  logic [OCC_W-1:0] rx_count [NPORT][NQ];
  logic             ni_cfg_we [NPORT];
  logic [CNT_W-1:0] ntxn [NPORT], nfail [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_ni
    pe_ni u_ni (
      .clk, .rst_n,
      .tx_we(tx_we[p]), .tx_q(tx_q[p]), .tx_data(tx_data[p]), .tx_count(tx_count[p]),
      .rx_pop(rx_pop[p]), .rx_q(rx_q[p]), .rx_valid(rx_valid[p]), .rx_data(rx_data[p]),
      .rx_count(rx_count[p]),
      .out_fwd(in_fwd[p]), .out_ack(in_ack[p]), .in_fwd(out_fwd[p]), .in_ack(out_ack[p]),
      .cfg_we(ni_cfg_we[p]), .cfg_q(cfg_q), .cfg_entry(cfg_entry),
      .txn_cnt(ntxn[p]), .fail_cnt(nfail[p]));
  end

  function automatic logic [WORD_W-1:0] word_of(int c, int n);
    return {8'(c), 24'(n)};
  endfunction

  int sent [NC], got [NC];
  int share [2];
  bit fast_sink;
  int total;

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink side: pop and check (runs for the whole test)
  initial begin
    forever begin
      logic [1:0] pq [NPORT];
      logic       pv [NPORT];
      @(negedge clk);
      for (int p = 0; p < NPORT; p++) begin
        int cand;
        cand = -1;
        for (int k = 0; k < NQ; k++) begin
          int qq;
          qq = (k + $urandom_range(NQ - 1)) % NQ;
          if (cand < 0 && rx_count[p][qq] != 0) cand = qq;
        end
        rx_pop[p] = (cand >= 0) && (fast_sink || $urandom_range(3) == 0);
        rx_q[p] = (cand >= 0) ? 2'(cand) : 2'd0;
        pq[p] = rx_q[p]; pv[p] = rx_pop[p];
      end
      @(posedge clk); #1;
      for (int p = 0; p < NPORT; p++) begin
        if (pv[p]) begin
          int c;
          c = -1;
          for (int k = 0; k < NC; k++) if (DST[k] == p && SQ[k] == pq[p]) c = k;
          checks++;
          if (c < 0) begin
            failures++; $display("FAIL data in unused sink %0d queue %0d", p, pq[p]);
          end else begin
            if (rx_data[p] !== word_of(c, got[c])) begin
              failures++; $display("FAIL C%0d word %0d: got %h", c, got[c], rx_data[p]);
            end
            got[c]++;
            total++;
          end
        end
      end
    end
  end

  // E-channel share between C0 (sink queue 0) and C1 (sink queue 1)
  bit measure;
  // grants of the E-port scheduler in cycles where both connections request
  // (C0 is request 2*4+1 = 9, C1 is 4*4+2 = 18)
  always @(posedge clk) begin
    if (measure && dut.g_out[0].u_tx.req[9] && dut.g_out[0].u_tx.req[18]
        && dut.g_out[0].u_tx.gnt_valid) begin
      if (dut.g_out[0].u_tx.gnt_idx == 9) share[0]++;
      else if (dut.g_out[0].u_tx.gnt_idx == 18) share[1]++;
    end
  end

  task automatic feed(input bit only_shared);
    for (int p = 0; p < NPORT; p++) tx_we[p] = 0;
    for (int c = 0; c < NC; c++) begin
      int p;
      p = SRC[c];
      if ((!only_shared || c < 2) && sent[c] < WORDS && tx_count[p][0] < 8 && $urandom_range(1)) begin
        tx_we[p] = 1; tx_q[p] = 0; tx_data[p] = word_of(c, sent[c]); sent[c]++;
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NPORT; p++) begin
      tx_we[p] = 0; tx_q[p] = 0; tx_data[p] = 0; ni_cfg_we[p] = 0;
    end
    for (int c = 0; c < NC; c++) begin sent[c] = 0; got[c] = 0; end
    share = '{0, 0}; total = 0; measure = 0; fast_sink = 1;
    sw_cfg_we = 0; cfg_out = P_E; cfg_bank = P_E; cfg_q = 0; cfg_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // set up the five virtual circuits
    for (int c = 0; c < NC; c++) begin
      ni_cfg_we[SRC[c]] = 1; cfg_q = 0;
      cfg_entry = '{valid: 1'b1, dport: port_e'(DST[c]), dq: 2'(BQ[c]), weight: WGT_W'(WG[c])};
      @(negedge clk);
      ni_cfg_we[SRC[c]] = 0;
      sw_cfg_we = 1; cfg_out = port_e'(DST[c]); cfg_bank = port_e'(SRC[c]); cfg_q = 2'(BQ[c]);
      cfg_entry = '{valid: 1'b1, dport: P_L, dq: 2'(SQ[c]), weight: WGT_W'(WG[c])};
      @(negedge clk);
      sw_cfg_we = 0;
    end

    // phase 1: C0 and C1 backlogged, fast sinks
    for (int k = 0; k < 60; k++) begin
      for (int c = 0; c < 2; c++)
        if (tx_count[SRC[c]][0] < 8) begin
          tx_we[SRC[c]] = 1; tx_q[SRC[c]] = 0; tx_data[SRC[c]] = word_of(c, sent[c]); sent[c]++;
        end
      @(negedge clk);
      for (int c = 0; c < 2; c++) tx_we[SRC[c]] = 0;
      if (k == 12) measure = 1;
    end
    measure = 0;
    $display("phase 1: E transfers %0d refused %0d", txn[P_E], fail[P_E]);
    checks++;
    if (share[0] + share[1] < 24 || real'(share[1]) < 1.7 * share[0] || real'(share[1]) > 2.3 * share[0]) begin
      failures++; $display("FAIL E channel share C0:C1 = %0d:%0d, expected 1:2", share[0], share[1]);
    end

    // phase 2: all connections, slow sinks
    fast_sink = 0;
    while (total < NC * WORDS) begin
      feed(0);
      @(negedge clk);
    end
    for (int p = 0; p < NPORT; p++) tx_we[p] = 0;
    checks++;
    if (fail[P_E] == 0) begin failures++; $display("FAIL no refusal on the E channel"); end
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (got[c] != WORDS) begin failures++; $display("FAIL C%0d delivered %0d", c, got[c]); end
    end
    $display("E channel share during phase 1 C0:C1 = %0d:%0d; E-port fail rate %0.3f",
             share[0], share[1], real'(fail[P_E]) / real'(txn[P_E]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
