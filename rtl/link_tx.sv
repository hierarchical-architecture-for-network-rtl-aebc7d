// Output port controller: sends the data of the port's buffer banks over one
// physical channel to the next switch (or to the local PE).
//
// How it works. Every queue of every bank of the port is a virtual channel.
// The address mapping table holds, per queue, the destination buffer in the
// next switch (its output port and queue) and the queue's round-robin weight.
// A queue requests the channel when its row is valid and it holds enough words
// for one more transfer beyond those already in flight; the weighted
// round-robin scheduler picks one requesting queue per transfer.
//
// A transfer of BEATS flits (RD_WORDS words each) runs as follows, counted
// from the grant cycle g, with NRS relay stations on the channel:
//   g               grant
//   g+1 .. g+BEATS  destination address on the Address-line
//   g+2 .. g+BEATS+1  the flits on the Data-line
//   g+2+2*NRS       the Ack-line is sampled (1 = the next buffer took them)
//   g+3+2*NRS       release: the flits are removed on an ack, otherwise
//                   they stay and are sent again in a later round
// On L1 (BEATS=1, NRS=0) this is the four-cycle transaction of the design
// description; between two L2 switches (BEATS=3, NRS=2) it is the eight-cycle
// one. A new transfer may start every BEATS cycles, so transfers overlap.
//
// Order is kept across refused transfers: after a refusal the queue waits
// until nothing of it is in flight, then sends alone, with the retry bit set,
// until one transfer is acknowledged. The receiving side refuses everything
// of a queue after a refusal until it sees that retry bit. This rule, the
// sense of the ack (1 = accepted) and the retry bit are this
// implementation's choices; the description leaves pipelined retransmission
// open.
//
// Statistics: txn_cnt counts finished transfers, fail_cnt refused ones
// (the fail rate of the design description is fail_cnt / txn_cnt).
module link_tx
  import noc_pkg::*;
#(
  parameter int unsigned NB       = 5,   // banks feeding this port
  parameter int unsigned RD_WORDS = 1,   // words per flit on this channel
  parameter int unsigned BEATS    = 1,   // flits per transfer
  parameter int unsigned NRS      = 0    // relay stations on the channel
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // address mapping table programming
  input  logic                 cfg_we,
  input  logic [$clog2(NB>1?NB:2)-1:0] cfg_bank,
  input  logic [QIDX_W-1:0]    cfg_q,
  input  map_entry_t           cfg_entry,
  // bank status and read port
  input  logic [OCC_W-1:0]     count   [NB][NQ],
  output logic                 rd_en,
  output logic [$clog2(NB>1?NB:2)-1:0] rd_bank,
  output logic [QIDX_W-1:0]    rd_q,
  output logic [OCC_W-1:0]     rd_off,
  input  logic [FLIT_W-1:0]    rd_data [NB],
  output logic                 pop_en,
  output logic [$clog2(NB>1?NB:2)-1:0] pop_bank,
  output logic [QIDX_W-1:0]    pop_q,
  output logic [OCC_W-1:0]     pop_words,
  // physical channel
  output link_fwd_t            fwd,
  input  logic                 ack_in,
  // statistics
  output logic [CNT_W-1:0]     txn_cnt,
  output logic [CNT_W-1:0]     fail_cnt
);

  localparam int unsigned BW   = $clog2(NB > 1 ? NB : 2);
  localparam int unsigned NREQ = NB * NQ;
  localparam int unsigned LRES = 3 + 2 * NRS;       // age of the release cycle
  localparam int unsigned LACK = 2 + 2 * NRS;       // age when the ack is seen
  localparam int unsigned BR   = BEATS * RD_WORDS;  // words per transfer
  localparam int unsigned IFW  = 4;                 // in-flight counter width

  typedef struct packed {
    logic              valid;
    logic [BW-1:0]     bank;
    logic [QIDX_W-1:0] q;
    port_e             dport;
    logic [QIDX_W-1:0] dq;
    logic              retry;
    logic [OCC_W-1:0]  off;    // words between queue head and this transfer
    logic              ok;     // ack seen
  } rec_t;

  map_entry_t     map_tab    [NB][NQ];
  logic [IFW-1:0] inflight   [NB][NQ];
  logic           need_retry [NB][NQ];
  rec_t           rec        [1:LRES];

  // ---------------- request and grant ----------------
  logic [NREQ-1:0]  req;
  logic [WGT_W-1:0] wgt [NREQ];
  logic             slot_free;
  logic             gnt_valid;
  logic [$clog2(NREQ)-1:0] gnt_idx;
  logic [BW-1:0]     g_bank;
  logic [QIDX_W-1:0] g_q;

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      for (int q = 0; q < NQ; q++) begin
        req[b*NQ+q] = map_tab[b][q].valid
                   && (int'(count[b][q]) >= (int'(inflight[b][q]) + 1) * BR)
                   && (!need_retry[b][q] || inflight[b][q] == '0);
        wgt[b*NQ+q] = map_tab[b][q].weight;
      end
    end
    slot_free = 1'b1;
    for (int a = 1; a < BEATS; a++)
      if (rec[a].valid) slot_free = 1'b0;
  end

  wrr_scheduler #(.N(NREQ), .STEP(BEATS)) u_sched (
    .clk, .rst_n,
    .en        (slot_free),
    .req       (req),
    .weight    (wgt),
    .gnt_valid (gnt_valid),
    .gnt_idx   (gnt_idx)
  );

  assign g_bank = BW'(int'(gnt_idx) / NQ);
  assign g_q    = QIDX_W'(int'(gnt_idx) % NQ);

  // ---------------- release ----------------
  rec_t res;
  logic res_pop;
  assign res     = rec[LRES];
  assign res_pop = res.valid && res.ok;

  assign pop_en    = res_pop;
  assign pop_bank  = res.bank;
  assign pop_q     = res.q;
  assign pop_words = OCC_W'(BR);

  // ---------------- channel outputs ----------------
  always_comb begin
    fwd     = '0;
    rd_en   = 1'b0;
    rd_bank = '0;
    rd_q    = '0;
    rd_off  = '0;
    for (int a = 1; a <= BEATS; a++) begin
      if (rec[a].valid) begin
        fwd.av    = 1'b1;
        fwd.retry = rec[a].retry;
        fwd.dport = rec[a].dport;
        fwd.dq    = rec[a].dq;
        rd_en     = 1'b1;
        rd_bank   = rec[a].bank;
        rd_q      = rec[a].q;
        rd_off    = rec[a].off + OCC_W'((a - 1) * RD_WORDS);
      end
    end
    for (int a = 2; a <= BEATS + 1; a++)
      if (rec[a].valid) fwd.data = rd_data[rec[a].bank];
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++)
        for (int q = 0; q < NQ; q++) begin
          map_tab[b][q]    <= '0;
          inflight[b][q]   <= '0;
          need_retry[b][q] <= 1'b0;
        end
      for (int a = 1; a <= LRES; a++) rec[a] <= '0;
      txn_cnt  <= '0;
      fail_cnt <= '0;
    end else begin
      if (cfg_we) map_tab[cfg_bank][cfg_q] <= cfg_entry;

      // age the transfers in flight
      for (int a = LRES; a >= 2; a--) begin
        rec[a] <= rec[a-1];
        if (a - 1 == LACK) rec[a].ok <= ack_in;
        if (res_pop && rec[a-1].valid && rec[a-1].bank == res.bank && rec[a-1].q == res.q)
          rec[a].off <= rec[a-1].off - OCC_W'(BR);
      end

      // new transfer
      rec[1] <= '0;
      if (slot_free && gnt_valid) begin
        rec[1].valid <= 1'b1;
        rec[1].bank  <= g_bank;
        rec[1].q     <= g_q;
        rec[1].dport <= map_tab[g_bank][g_q].dport;
        rec[1].dq    <= map_tab[g_bank][g_q].dq;
        rec[1].retry <= need_retry[g_bank][g_q];
        rec[1].off   <= OCC_W'(int'(inflight[g_bank][g_q]) * BR)
                      - ((res_pop && res.bank == g_bank && res.q == g_q) ? OCC_W'(BR) : '0);
      end

      // in-flight bookkeeping
      for (int b = 0; b < NB; b++)
        for (int q = 0; q < NQ; q++) begin
          logic inc, dec;
          inc = slot_free && gnt_valid && g_bank == b && g_q == q;
          dec = res.valid && res.bank == b && res.q == q;
          inflight[b][q] <= inflight[b][q] + IFW'(inc) - IFW'(dec);
          if (dec) need_retry[b][q] <= !res.ok;
        end

      if (res.valid) begin
        txn_cnt <= txn_cnt + 1'b1;
        if (!res.ok) fail_cnt <= fail_cnt + 1'b1;
      end
    end
  end

endmodule
