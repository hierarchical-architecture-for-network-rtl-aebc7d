// End-to-end test of the hierarchical NoC on a reduced 5 x 3 L1 mesh with a
// 2 x 1 L2 mesh: the smallest mesh that holds two SW_I of opposite channel
// orientation joined over L2. The same connections fit any larger mesh.
// Three virtual circuits are set up by writing the
// address mapping tables along their paths, then driven from the PEs:
//   A  PE(0,0) -> SW(0,1) -> SW_I(1,1) -> SW_L2(0,0) -E-> SW_L2(1,0)
//        -> SW_I(4,1) -> SW(4,2) -> PE(4,2) sink queue 0          96 words
//   B  PE(2,2) -> SW(3,2) -> SW(4,2) -> PE(4,2) sink queue 1       48 words
//   C  PE(4,0) -> SW_I(4,1) -> SW_L2(1,0) -W-> SW_L2(0,0)
//        -> SW_I(1,1) -> SW(0,1) -> PE(0,1) sink queue 2          48 words
// A climbs to L2 and down again, C takes L2 the other way; A and B share the
// local output channel of SW(4,2). PE(4,2) holds back for a while and then
// reads slowly, so the queues back up all the way into L2.
// Checked: every word arrives once and in order; each mechanism happens at
// least once and is counted: one-word L1 transfers, packing of four words
// into an L2 flit, bursts of three flits between SW_L2 through the relay
// stations, unpacking, refused transfers on L1 and on L2 and their repetition,
// and two virtual channels competing for one physical channel. The number of
// successful flits and bursts on each hop must match the words sent.
module tb_hier_noc_small;
  import noc_pkg::*;

  localparam int NX = 5, NY = 3, NX2 = 2;
  localparam int NN = NX * NY;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              cfg_we;
  logic [1:0]        cfg_sel;
  logic [15:0]       cfg_id;
  port_e             cfg_out, cfg_bank;
  logic [QIDX_W-1:0] cfg_q;
  map_entry_t        cfg_entry;
  logic              pe_tx_we    [NN];
  logic [QIDX_W-1:0] pe_tx_q     [NN];
  logic [WORD_W-1:0] pe_tx_data  [NN];
  logic [OCC_W-1:0]  pe_tx_count [NN][NQ];
  logic              pe_rx_pop   [NN];
  logic [QIDX_W-1:0] pe_rx_q     [NN];
  logic              pe_rx_valid [NN];
  logic [WORD_W-1:0] pe_rx_data  [NN];
  logic [OCC_W-1:0]  pe_rx_count [NN][NQ];
  logic [1:0]        stat_sel;
  logic [15:0]       stat_id;
  port_e             stat_port;
  logic [CNT_W-1:0]  stat_txn, stat_fail;

  hier_noc_top #(.NX(NX), .NY(NY)) dut (.*);

  function automatic int id(int x, int y);
    return y * NX + x;
  endfunction

  // ---------------- connection set-up ----------------
  task automatic wr_cfg(input int sel, input int nid, input port_e o, input port_e b,
                        input int q, input port_e dp, input int dq, input int w);
    @(negedge clk);
    cfg_we = 1; cfg_sel = 2'(sel); cfg_id = 16'(nid); cfg_out = o; cfg_bank = b;
    cfg_q = 2'(q); cfg_entry = '{valid: 1'b1, dport: dp, dq: 2'(dq), weight: WGT_W'(w)};
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic setup();
    // A
    wr_cfg(1, id(0,0), P_L, P_L, 0, P_N, 0, 1);
    wr_cfg(0, id(0,0), P_N, P_L, 0, P_E, 0, 1);
    wr_cfg(0, id(0,1), P_E, P_S, 0, P_L, 0, 1);
    wr_cfg(0, id(1,1), P_L, P_W, 0, P_E, 0, 1);
    wr_cfg(2, 0,       P_E, P_L, 0, P_L, 0, 3);
    wr_cfg(2, 1,       P_L, P_W, 0, P_N, 0, 1);
    wr_cfg(0, id(4,1), P_N, P_L, 0, P_L, 0, 1);
    wr_cfg(0, id(4,2), P_L, P_S, 0, P_L, 0, 1);
    // B
    wr_cfg(1, id(2,2), P_L, P_L, 0, P_E, 0, 1);
    wr_cfg(0, id(2,2), P_E, P_L, 0, P_E, 0, 1);
    wr_cfg(0, id(3,2), P_E, P_W, 0, P_L, 1, 1);
    wr_cfg(0, id(4,2), P_L, P_W, 1, P_L, 1, 1);
    // C
    wr_cfg(1, id(4,0), P_L, P_L, 0, P_N, 0, 1);
    wr_cfg(0, id(4,0), P_N, P_L, 0, P_L, 1, 1);
    wr_cfg(0, id(4,1), P_L, P_S, 1, P_W, 0, 1);
    wr_cfg(2, 1,       P_W, P_L, 0, P_L, 1, 3);
    wr_cfg(2, 0,       P_L, P_E, 1, P_W, 1, 1);
    wr_cfg(0, id(1,1), P_W, P_L, 1, P_L, 2, 1);
    wr_cfg(0, id(0,1), P_L, P_E, 2, P_L, 2, 1);
  endtask

  // ---------------- traffic ----------------
  localparam int NCON = 3;
  localparam int SRC_X [NCON] = '{0, 2, 4};
  localparam int SRC_Y [NCON] = '{0, 2, 0};
  localparam int DST_X [NCON] = '{4, 4, 0};
  localparam int DST_Y [NCON] = '{2, 2, 1};
  localparam int DST_Q [NCON] = '{0, 1, 2};
  localparam int WORDS [NCON] = '{96, 48, 48};

  function automatic logic [WORD_W-1:0] word_of(int c, int n);
    return {8'(8'hC0 + c), 24'(n)};
  endfunction

  int sent [NCON], got [NCON];
  int cyc;
  bit sink_go;
  int contention;

  always_ff @(posedge clk) cyc <= cyc + 1;

  // two virtual channels of SW(4,2) want its local output in the same cycle
  // (bank S queue 0 is request 4, bank W queue 1 is request 9)
  always @(posedge clk)
    if (dut.g_y[2].g_x[4].u_sw.g_out[4].u_tx.req[4] && dut.g_y[2].g_x[4].u_sw.g_out[4].u_tx.req[9])
      contention++;

  initial begin
    #50000;  // 5000 cycles; the test needs under 1000
    failures++;
    $display("FAIL watchdog at cycle %0d: got %0d %0d %0d", cyc, got[0], got[1], got[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stat(input int sel, input int nid, input port_e p, output int ok, output int fl);
    stat_sel = 2'(sel); stat_id = 16'(nid); stat_port = p;
    #1;
    ok = int'(stat_txn - stat_fail);
    fl = int'(stat_fail);
  endtask

  task automatic expect_ok(input string what, input int sel, input int nid, input port_e p,
                           input int exp_ok, inout int fails_seen);
    int ok, fl;
    stat(sel, nid, p, ok, fl);
    checks++;
    if (ok != exp_ok) begin
      failures++; $display("FAIL %s: %0d successful transfers, expected %0d", what, ok, exp_ok);
    end
    fails_seen += fl;
    $display("  %-34s %4d transfers, %4d refused", what, ok + fl, fl);
  endtask

  initial begin
    int l1_fail, l2_fail, up_fail;
    cfg_we = 0; cfg_sel = 0; cfg_id = 0; cfg_out = P_E; cfg_bank = P_E; cfg_q = 0;
    cfg_entry = '0; stat_sel = 0; stat_id = 0; stat_port = P_E;
    for (int n = 0; n < NN; n++) begin
      pe_tx_we[n] = 0; pe_tx_q[n] = 0; pe_tx_data[n] = 0; pe_rx_pop[n] = 0; pe_rx_q[n] = 0;
    end
    for (int c = 0; c < NCON; c++) begin sent[c] = 0; got[c] = 0; end
    sink_go = 0; contention = 0; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    setup();

    fork
      // sources
      begin
        while (sent[0] < WORDS[0] || sent[1] < WORDS[1] || sent[2] < WORDS[2]) begin
          @(negedge clk);
          for (int c = 0; c < NCON; c++) begin
            int n;
            n = id(SRC_X[c], SRC_Y[c]);
            pe_tx_we[n] = 0;
            if (sent[c] < WORDS[c] && pe_tx_count[n][0] < 8) begin
              pe_tx_we[n] = 1; pe_tx_q[n] = 0; pe_tx_data[n] = word_of(c, sent[c]); sent[c]++;
            end
          end
        end
        @(negedge clk);
        for (int c = 0; c < NCON; c++) pe_tx_we[id(SRC_X[c], SRC_Y[c])] = 0;
      end
      // sinks
      begin
        int start;
        start = cyc;
        while (got[0] < WORDS[0] || got[1] < WORDS[1] || got[2] < WORDS[2]) begin
          int pc [NCON];
          @(negedge clk);
          for (int c = 0; c < NCON; c++) begin
            int n;
            n = id(DST_X[c], DST_Y[c]);
            pc[c] = 0;
            if (c == 0 || c == 2) begin
              pe_rx_pop[n] = 0;
            end
          end
          // PE(4,2): nothing for 400 cycles, then one word every third cycle
          if (cyc - start > 400 && cyc % 3 == 0) begin
            int n, q;
            n = id(4, 2);
            q = (cyc % 2 == 0) ? 0 : 1;
            if (pe_rx_count[n][q] == 0) q = 1 - q;
            if (pe_rx_count[n][q] != 0) begin
              pe_rx_pop[n] = 1; pe_rx_q[n] = 2'(q); pc[q] = 1;
            end
          end
          // PE(0,1): every second cycle
          if (cyc % 2 == 0 && pe_rx_count[id(0,1)][2] != 0) begin
            pe_rx_pop[id(0,1)] = 1; pe_rx_q[id(0,1)] = 2; pc[2] = 1;
          end
          @(posedge clk); #1;
          for (int c = 0; c < NCON; c++) begin
            if (pc[c]) begin
              int n;
              n = id(DST_X[c], DST_Y[c]);
              checks++;
              if (!pe_rx_valid[n] || pe_rx_data[n] !== word_of(c, got[c])) begin
                failures++;
                $display("FAIL connection %0d word %0d: got %h", c, got[c], pe_rx_data[n]);
              end
              got[c]++;
            end
          end
        end
        pe_rx_pop[id(4,2)] = 0; pe_rx_pop[id(0,1)] = 0;
      end
    join

    $display("all %0d words delivered after %0d cycles; per-hop counts:",
             WORDS[0] + WORDS[1] + WORDS[2], cyc);
    l1_fail = 0; l2_fail = 0; up_fail = 0;
    expect_ok("A  L1 one-word  SW(0,0).N",        0, id(0,0), P_N, 96, l1_fail);
    expect_ok("A  pack 1->4    SW(0,1).E",        0, id(0,1), P_E, 24, up_fail);
    expect_ok("A  SW_I up      SW_I(1,1).L",      0, id(1,1), P_L, 24, up_fail);
    expect_ok("A  L2 burst     SW_L2(0,0).E",     2, 0,       P_E, 8,  l2_fail);
    expect_ok("A  L2 down      SW_L2(1,0).L",     2, 1,       P_L, 24, l2_fail);
    expect_ok("A  SW_I down    SW_I(4,1).N",      0, id(4,1), P_N, 24, up_fail);
    expect_ok("A+B unpack/L1   SW(4,2).L",        0, id(4,2), P_L, 144, l1_fail);
    expect_ok("B  L1           SW(3,2).E",        0, id(3,2), P_E, 48, l1_fail);
    expect_ok("C  pack 1->4    SW(4,0).N",        0, id(4,0), P_N, 12, up_fail);
    expect_ok("C  L2 burst     SW_L2(1,0).W",     2, 1,       P_W, 4,  l2_fail);
    expect_ok("C  unpack 4->1  SW(0,1).L",        0, id(0,1), P_L, 48, l1_fail);

    checks++;
    if (l1_fail == 0) begin failures++; $display("FAIL no refused transfer on L1"); end
    checks++;
    if (l2_fail == 0) begin failures++; $display("FAIL no refused transfer on L2"); end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no contention for SW(4,2).L"); end
    $display("mechanisms: L1 refusals %0d, L2 refusals %0d, SW_I-side refusals %0d, contention cycles %0d",
             l1_fail, l2_fail, up_fail, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
