// Five-port virtual-circuit switch (E, S, W, N and the local port L).
//
// Buffers sit at the outputs. Each output port owns four buffer banks, one
// for each of the other four input directions, and each bank is split into
// NQ virtual-channel queues. An input port therefore never arbitrates: the
// destination buffer address that arrives on its Address-line names an
// output port and a queue, and the data go straight into that output port's
// bank for this input direction. Each output port runs its own weighted
// round-robin scheduler and address mapping table (link_tx) over its 4 x NQ
// queues. Connections are set up before data flow by writing the address
// mapping tables through the cfg port: cfg_out selects the output port,
// cfg_bank the bank (named by its input direction), cfg_q the queue.
//
// One module covers all switch kinds of the hierarchical platform through its
// parameters, which are given per port p (index = port_e value):
//   PW[p]      words per flit on the channel of port p (1 on L1, R=4 on L2)
//   BEATS[p]   flits per transfer on that channel (3 between two SW_L2)
//   NRS[p]     relay stations on that channel (2 between two SW_L2)
//   QWORDS[o*5+i]  words per queue in bank i of output port o
// A bank written from a 1-word channel and read by a 4-word channel packs
// words into L2 flits, and the reverse unpacks them, which is how the
// switches next to an interchange switch bridge the two widths.
//
// Interface: in_fwd[p]/in_ack[p] is the channel arriving at port p (the ack
// is driven by this switch), out_fwd[p]/out_ack[p] the channel leaving it.
// Per output port txn_cnt/fail_cnt count finished and refused transfers.
// Timing is that of link_tx and link_rx. The architecture follows the design
// description; the configuration port and the statistics are this
// implementation's additions.
module vc_switch
  import noc_pkg::*;
#(
  parameter int unsigned PW     [NPORT]       = '{default: 1},
  parameter int unsigned BEATS  [NPORT]       = '{default: 1},
  parameter int unsigned NRS    [NPORT]       = '{default: 0},
  parameter int unsigned QWORDS [NPORT*NPORT] = '{default: 2}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_fwd_t         in_fwd  [NPORT],
  output logic              in_ack  [NPORT],
  output link_fwd_t         out_fwd [NPORT],
  input  logic              out_ack [NPORT],
  input  logic              cfg_we,
  input  port_e             cfg_out,
  input  port_e             cfg_bank,
  input  logic [QIDX_W-1:0] cfg_q,
  input  map_entry_t        cfg_entry,
  output logic [CNT_W-1:0]  txn_cnt  [NPORT],
  output logic [CNT_W-1:0]  fail_cnt [NPORT]
);

  localparam int unsigned BW = $clog2(NPORT);

  // bank signals, [output port][input direction]; the diagonal is empty
  logic [OCC_W-1:0]  b_count [NPORT][NPORT][NQ];
  logic [FLIT_W-1:0] b_rdata [NPORT][NPORT];
  logic              b_wr_en [NPORT][NPORT];

  // input side
  logic              rx_wr_en   [NPORT];
  port_e             rx_wr_port [NPORT];
  logic [QIDX_W-1:0] rx_wr_q    [NPORT];
  logic [FLIT_W-1:0] rx_wr_data [NPORT];
  logic [OCC_W-1:0]  rx_free    [NPORT][NPORT][NQ];
  logic              rx_ok      [NPORT][NPORT];
  logic [CNT_W-1:0]  rx_acc     [NPORT];
  logic [CNT_W-1:0]  rx_ref     [NPORT];

  // output side
  logic              tx_rd_en   [NPORT];
  logic [BW-1:0]     tx_rd_bank [NPORT];
  logic [QIDX_W-1:0] tx_rd_q    [NPORT];
  logic [OCC_W-1:0]  tx_rd_off  [NPORT];
  logic              tx_pop_en  [NPORT];
  logic [BW-1:0]     tx_pop_bank[NPORT];
  logic [QIDX_W-1:0] tx_pop_q   [NPORT];
  logic [OCC_W-1:0]  tx_pop_w   [NPORT];

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    for (genvar o = 0; o < NPORT; o++) begin : g_free
      for (genvar q = 0; q < NQ; q++) begin : g_q
        if (o != i) begin : g_real
          assign rx_free[i][o][q] = OCC_W'(QWORDS[o*NPORT+i]) - b_count[o][i][q];
        end else begin : g_none
          assign rx_free[i][o][q] = '0;
        end
      end
      assign rx_ok[i][o] = (o != i);
    end

    link_rx #(.WR_WORDS(PW[i]), .BEATS(BEATS[i])) u_rx (
      .clk, .rst_n,
      .fwd      (in_fwd[i]),
      .ack_out  (in_ack[i]),
      .tgt_free (rx_free[i]),
      .tgt_ok   (rx_ok[i]),
      .wr_en    (rx_wr_en[i]),
      .wr_port  (rx_wr_port[i]),
      .wr_q     (rx_wr_q[i]),
      .wr_data  (rx_wr_data[i]),
      .acc_cnt  (rx_acc[i]),
      .ref_cnt  (rx_ref[i])
    );
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    for (genvar i = 0; i < NPORT; i++) begin : g_bank
      if (o != i) begin : g_real
        assign b_wr_en[o][i] = rx_wr_en[i] && (rx_wr_port[i] == port_e'(o));
        vc_buffer_bank #(
          .NQ_B(NQ), .QW(QWORDS[o*NPORT+i]), .WR_WORDS(PW[i]), .RD_WORDS(PW[o])
        ) u_bank (
          .clk, .rst_n,
          .wr_en     (b_wr_en[o][i]),
          .wr_q      (rx_wr_q[i]),
          .wr_data   (rx_wr_data[i]),
          .rd_en     (tx_rd_en[o] && tx_rd_bank[o] == BW'(i)),
          .rd_q      (tx_rd_q[o]),
          .rd_off    (tx_rd_off[o]),
          .rd_data   (b_rdata[o][i]),
          .pop_en    (tx_pop_en[o] && tx_pop_bank[o] == BW'(i)),
          .pop_q     (tx_pop_q[o]),
          .pop_words (tx_pop_w[o]),
          .count     (b_count[o][i])
        );
      end else begin : g_none
        assign b_wr_en[o][i] = 1'b0;
        assign b_rdata[o][i] = '0;
        for (genvar q = 0; q < NQ; q++) begin : g_q
          assign b_count[o][i][q] = '0;
        end
      end
    end

    link_tx #(.NB(NPORT), .RD_WORDS(PW[o]), .BEATS(BEATS[o]), .NRS(NRS[o])) u_tx (
      .clk, .rst_n,
      .cfg_we    (cfg_we && cfg_out == port_e'(o)),
      .cfg_bank  (BW'(cfg_bank)),
      .cfg_q     (cfg_q),
      .cfg_entry (cfg_entry),
      .count     (b_count[o]),
      .rd_en     (tx_rd_en[o]),
      .rd_bank   (tx_rd_bank[o]),
      .rd_q      (tx_rd_q[o]),
      .rd_off    (tx_rd_off[o]),
      .rd_data   (b_rdata[o]),
      .pop_en    (tx_pop_en[o]),
      .pop_bank  (tx_pop_bank[o]),
      .pop_q     (tx_pop_q[o]),
      .pop_words (tx_pop_w[o]),
      .fwd       (out_fwd[o]),
      .ack_in    (out_ack[o]),
      .txn_cnt   (txn_cnt[o]),
      .fail_cnt  (fail_cnt[o])
    );
  end

  // A transfer may not turn back through the port it came from.
  for (genvar i = 0; i < NPORT; i++) begin : g_chk
    always_ff @(posedge clk) begin
      if (rst_n && rx_wr_en[i])
        assert (rx_wr_port[i] != port_e'(i)) else $error("vc_switch: U-turn write");
    end
  end

endmodule
