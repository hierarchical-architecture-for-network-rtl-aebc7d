// Test environment for one physical channel: source bank -> link_tx ->
// NRS relay stations -> link_rx -> destination bank, with a random producer
// and a slow random consumer so that the destination queues fill up and
// transfers are refused and sent again.
//
// Checks: the first, isolated transfer takes 4 + 2*NRS cycles from grant to
// release (4 on L1, 8 with the two relay stations of L2), counted from the
// first Address-line cycle; every word arrives once, in order, in the queue
// the address mapping table names; refusals do happen.
module tb_link_env
  import noc_pkg::*;
#(
  parameter int unsigned RDW   = 1,
  parameter int unsigned BEATS = 1,
  parameter int unsigned NRS   = 0,
  parameter int unsigned SRCQW = 8,
  parameter int unsigned DSTQW = 2,
  parameter int unsigned FLITS = 60,   // flits per connection, multiple of BEATS
  parameter int unsigned W0    = 1,
  parameter int unsigned W1    = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);

  // source bank
  logic              s_wr_en;
  logic [1:0]        s_wr_q;
  logic [FLIT_W-1:0] s_wr_data;
  logic              s_rd_en;
  logic [0:0]        s_rd_bank, s_pop_bank;
  logic [1:0]        s_rd_q, s_pop_q;
  logic [OCC_W-1:0]  s_rd_off, s_pop_w;
  logic [FLIT_W-1:0] s_rd_data [1];
  logic              s_pop_en;
  logic [OCC_W-1:0]  s_cnt [1][NQ];

  vc_buffer_bank #(.QW(SRCQW), .WR_WORDS(RDW), .RD_WORDS(RDW)) u_src (
    .clk, .rst_n, .wr_en(s_wr_en), .wr_q(s_wr_q), .wr_data(s_wr_data),
    .rd_en(s_rd_en), .rd_q(s_rd_q), .rd_off(s_rd_off), .rd_data(s_rd_data[0]),
    .pop_en(s_pop_en), .pop_q(s_pop_q), .pop_words(s_pop_w), .count(s_cnt[0]));

  logic       cfg_we;
  logic [1:0] cfg_q;
  map_entry_t cfg_entry;
  link_fwd_t  fwd [NRS+1];
  logic       ack [NRS+1];
  logic [CNT_W-1:0] txn, fail;

  link_tx #(.NB(1), .RD_WORDS(RDW), .BEATS(BEATS), .NRS(NRS)) u_tx (
    .clk, .rst_n, .cfg_we, .cfg_bank(1'b0), .cfg_q, .cfg_entry,
    .count(s_cnt), .rd_en(s_rd_en), .rd_bank(s_rd_bank), .rd_q(s_rd_q), .rd_off(s_rd_off),
    .rd_data(s_rd_data), .pop_en(s_pop_en), .pop_bank(s_pop_bank), .pop_q(s_pop_q),
    .pop_words(s_pop_w), .fwd(fwd[0]), .ack_in(ack[0]), .txn_cnt(txn), .fail_cnt(fail));

  for (genvar s = 0; s < NRS; s++) begin : g_rs
    relay_station u_rs (.clk, .rst_n, .fwd_in(fwd[s]), .fwd_out(fwd[s+1]),
                        .ack_in(ack[s+1]), .ack_out(ack[s]));
  end

  // destination bank
  logic [OCC_W-1:0]  d_cnt [NQ];
  logic [OCC_W-1:0]  d_free [NPORT][NQ];
  logic              d_ok [NPORT];
  logic              d_wr_en;
  port_e             d_wr_port;
  logic [1:0]        d_wr_q;
  logic [FLIT_W-1:0] d_wr_data, d_rd_data;
  logic [CNT_W-1:0]  acc, refu;
  logic              d_pop;
  logic [1:0]        d_q;

  for (genvar p = 0; p < NPORT; p++) begin : g_free
    for (genvar q = 0; q < NQ; q++) begin : g_q
      assign d_free[p][q] = OCC_W'(DSTQW) - d_cnt[q];
    end
    assign d_ok[p] = 1'b1;
  end

  link_rx #(.WR_WORDS(RDW), .BEATS(BEATS)) u_rx (
    .clk, .rst_n, .fwd(fwd[NRS]), .ack_out(ack[NRS]), .tgt_free(d_free), .tgt_ok(d_ok),
    .wr_en(d_wr_en), .wr_port(d_wr_port), .wr_q(d_wr_q), .wr_data(d_wr_data),
    .acc_cnt(acc), .ref_cnt(refu));

  vc_buffer_bank #(.QW(DSTQW), .WR_WORDS(RDW), .RD_WORDS(RDW)) u_dst (
    .clk, .rst_n, .wr_en(d_wr_en), .wr_q(d_wr_q), .wr_data(d_wr_data),
    .rd_en(d_pop), .rd_q(d_q), .rd_off('0), .rd_data(d_rd_data),
    .pop_en(d_pop), .pop_q(d_q), .pop_words(OCC_W'(RDW)), .count(d_cnt));

  function automatic logic [FLIT_W-1:0] flit_of(int conn, int n);
    logic [FLIT_W-1:0] f;
    f = '0;
    for (int k = 0; k < RDW; k++) f[k*WORD_W +: WORD_W] = {8'(conn + 8'hA0), 24'(n * RDW + k)};
    return f;
  endfunction

  int sent [2], got [2];
  int t_av, t_pop, cyc;
  logic prev_pop;
  logic [1:0] prev_q;

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    s_wr_en = 0; s_wr_q = 0; s_wr_data = 0; d_pop = 0; d_q = 0;
    cfg_we = 0; cfg_q = 0; cfg_entry = '0;
    sent = '{0, 0}; got = '{0, 0}; t_av = -1; t_pop = -1;
    @(posedge rst_n);
    @(negedge clk);
    // connection 0: source queue 0 -> destination queue 2, connection 1: 1 -> 3
    cfg_we = 1; cfg_q = 0; cfg_entry = '{valid: 1'b1, dport: P_E, dq: 2'd2, weight: WGT_W'(W0)};
    @(negedge clk);
    cfg_q = 1; cfg_entry = '{valid: 1'b1, dport: P_E, dq: 2'd3, weight: WGT_W'(W1)};
    @(negedge clk);
    cfg_we = 0;

    // isolated transfer on connection 0
    for (int b = 0; b < BEATS; b++) begin
      s_wr_en = 1; s_wr_q = 0; s_wr_data = flit_of(0, sent[0]); sent[0]++;
      @(negedge clk);
    end
    s_wr_en = 0;
    while (t_pop < 0) begin
      if (fwd[0].av && t_av < 0) t_av = cyc;
      if (s_pop_en) t_pop = cyc;
      @(negedge clk);
    end
    checks++;
    if (t_pop - t_av + 2 != 4 + 2 * NRS) begin
      failures++;
      $display("FAIL transaction took %0d cycles, expected %0d", t_pop - t_av + 2, 4 + 2 * NRS);
    end

    // random traffic
    while (got[0] < FLITS || got[1] < FLITS) begin
      int c;
      // producer
      c = $urandom_range(1);
      s_wr_en = 0;
      if (sent[c] < FLITS && int'(s_cnt[0][c]) + RDW <= SRCQW && $urandom_range(1) == 1) begin
        s_wr_en = 1; s_wr_q = 2'(c); s_wr_data = flit_of(c, sent[c]);
        sent[c]++;
      end
      // consumer, slow
      d_pop = 0;
      c = $urandom_range(1);
      if (int'(d_cnt[2 + c]) >= RDW && $urandom_range(3) == 0) begin
        d_pop = 1; d_q = 2'(2 + c);
      end
      @(posedge clk);
      #1;
      if (d_pop) begin
        checks++;
        if (d_rd_data !== flit_of(int'(d_q) - 2, got[int'(d_q) - 2])) begin
          failures++;
          $display("FAIL connection %0d flit %0d: got %h", int'(d_q) - 2, got[int'(d_q) - 2], d_rd_data);
        end
        got[int'(d_q) - 2]++;
      end
      @(negedge clk);
    end
    s_wr_en = 0; d_pop = 0;
    checks++;
    if (fail == 0 || refu == 0) begin
      failures++; $display("FAIL no refused transfer happened");
    end
    checks++;
    if (txn - fail != CNT_W'(2 * FLITS / BEATS)) begin
      failures++; $display("FAIL %0d successful transfers, expected %0d", txn - fail, 2 * FLITS / BEATS);
    end
    checks++;
    if (acc != txn - fail) begin
      failures++; $display("FAIL sender and receiver disagree: %0d vs %0d", acc, txn - fail);
    end
    $display("channel RDW=%0d BEATS=%0d NRS=%0d: %0d transfers, %0d refused (fail rate %0.3f)",
             RDW, BEATS, NRS, txn, fail, real'(fail) / real'(txn));
    done = 1;
  end

endmodule
