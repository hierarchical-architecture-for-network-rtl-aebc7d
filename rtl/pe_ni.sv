// Network interface of a processing element (PE).
//
// The PE talks to its local switch over the same kind of physical channel as
// two switches do, so the interface is a one-port switch: a source bank with
// NQ queues that the processor fills and that a link_tx empties towards the
// switch's L port, and a sink bank with NQ queues that a link_rx fills from the
// switch's L port and the processor empties. Each source queue is the start of
// one connection; its row of the address mapping table (cfg port) names the
// buffer of the local switch the connection enters (output port and queue)
// and its weight. Each sink queue is the end of one connection; the last
// switch of a connection names it in the dq field, the dport field is ignored.
//
// Processor side: tx_we writes one word into source queue tx_q; a write to a
// full queue is ignored, so the processor watches tx_count. rx_pop removes the
// head word of sink queue rx_q; the word appears on rx_data with rx_valid one
// cycle later (a pop of an empty queue gives no rx_valid). Timing on the
// network side is that of link_tx and link_rx with one-word flits and no relay
// stations. The design description gives the PE's buffers and network
// interface only by name; the queue sizes and this processor interface are
// this implementation's choices.
module pe_ni
  import noc_pkg::*;
#(
  parameter int unsigned TXQW = 8,   // words per source queue
  parameter int unsigned RXQW = 8    // words per sink queue
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor, sending
  input  logic              tx_we,
  input  logic [QIDX_W-1:0] tx_q,
  input  logic [WORD_W-1:0] tx_data,
  output logic [OCC_W-1:0]  tx_count [NQ],
  // processor, receiving
  input  logic              rx_pop,
  input  logic [QIDX_W-1:0] rx_q,
  output logic              rx_valid,
  output logic [WORD_W-1:0] rx_data,
  output logic [OCC_W-1:0]  rx_count [NQ],
  // channel to the local switch
  output link_fwd_t         out_fwd,
  input  logic              out_ack,
  // channel from the local switch
  input  link_fwd_t         in_fwd,
  output logic              in_ack,
  // connection set-up
  input  logic              cfg_we,
  input  logic [QIDX_W-1:0] cfg_q,
  input  map_entry_t        cfg_entry,
  // statistics of the sending side
  output logic [CNT_W-1:0]  txn_cnt,
  output logic [CNT_W-1:0]  fail_cnt
);

  // ---------------- sending side ----------------
  logic              s_wr_en;
  logic              s_rd_en;
  logic [0:0]        s_rd_bank;
  logic [QIDX_W-1:0] s_rd_q;
  logic [OCC_W-1:0]  s_rd_off;
  logic [FLIT_W-1:0] s_rd_data [1];
  logic              s_pop_en;
  logic [0:0]        s_pop_bank;
  logic [QIDX_W-1:0] s_pop_q;
  logic [OCC_W-1:0]  s_pop_w;
  logic [OCC_W-1:0]  s_count [1][NQ];

  assign s_wr_en = tx_we && (int'(tx_count[tx_q]) < TXQW);

  vc_buffer_bank #(.NQ_B(NQ), .QW(TXQW), .WR_WORDS(1), .RD_WORDS(1)) u_src (
    .clk, .rst_n,
    .wr_en     (s_wr_en),
    .wr_q      (tx_q),
    .wr_data   ({{(FLIT_W-WORD_W){1'b0}}, tx_data}),
    .rd_en     (s_rd_en),
    .rd_q      (s_rd_q),
    .rd_off    (s_rd_off),
    .rd_data   (s_rd_data[0]),
    .pop_en    (s_pop_en),
    .pop_q     (s_pop_q),
    .pop_words (s_pop_w),
    .count     (tx_count)
  );

  assign s_count[0] = tx_count;

  link_tx #(.NB(1), .RD_WORDS(1), .BEATS(1), .NRS(0)) u_tx (
    .clk, .rst_n,
    .cfg_we    (cfg_we),
    .cfg_bank  (1'b0),
    .cfg_q     (cfg_q),
    .cfg_entry (cfg_entry),
    .count     (s_count),
    .rd_en     (s_rd_en),
    .rd_bank   (s_rd_bank),
    .rd_q      (s_rd_q),
    .rd_off    (s_rd_off),
    .rd_data   (s_rd_data),
    .pop_en    (s_pop_en),
    .pop_bank  (s_pop_bank),
    .pop_q     (s_pop_q),
    .pop_words (s_pop_w),
    .fwd       (out_fwd),
    .ack_in    (out_ack),
    .txn_cnt   (txn_cnt),
    .fail_cnt  (fail_cnt)
  );

  // ---------------- receiving side ----------------
  logic [OCC_W-1:0]  k_free [NPORT][NQ];
  logic              k_ok   [NPORT];
  logic              k_wr_en;
  port_e             k_wr_port;
  logic [QIDX_W-1:0] k_wr_q;
  logic [FLIT_W-1:0] k_wr_data;
  logic [CNT_W-1:0]  k_acc, k_ref;
  logic              k_pop;
  logic [FLIT_W-1:0] k_rd_data;

  // every destination port name maps onto the single sink bank
  for (genvar p = 0; p < NPORT; p++) begin : g_free
    for (genvar q = 0; q < NQ; q++) begin : g_q
      assign k_free[p][q] = OCC_W'(RXQW) - rx_count[q];
    end
    assign k_ok[p] = 1'b1;
  end

  link_rx #(.WR_WORDS(1), .BEATS(1)) u_rx (
    .clk, .rst_n,
    .fwd      (in_fwd),
    .ack_out  (in_ack),
    .tgt_free (k_free),
    .tgt_ok   (k_ok),
    .wr_en    (k_wr_en),
    .wr_port  (k_wr_port),
    .wr_q     (k_wr_q),
    .wr_data  (k_wr_data),
    .acc_cnt  (k_acc),
    .ref_cnt  (k_ref)
  );

  assign k_pop = rx_pop && (rx_count[rx_q] != '0);

  vc_buffer_bank #(.NQ_B(NQ), .QW(RXQW), .WR_WORDS(1), .RD_WORDS(1)) u_sink (
    .clk, .rst_n,
    .wr_en     (k_wr_en),
    .wr_q      (k_wr_q),
    .wr_data   (k_wr_data),
    .rd_en     (k_pop),
    .rd_q      (rx_q),
    .rd_off    ('0),
    .rd_data   (k_rd_data),
    .pop_en    (k_pop),
    .pop_q     (rx_q),
    .pop_words (OCC_W'(1)),
    .count     (rx_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_valid <= 1'b0;
    else        rx_valid <= k_pop;
  end
  assign rx_data = k_rd_data[WORD_W-1:0];

endmodule
