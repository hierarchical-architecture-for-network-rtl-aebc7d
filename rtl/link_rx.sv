// Input port controller: receives transfers arriving on one physical channel
// and stores them in the output buffer banks of the switch.
//
// How it works. When the Address-line becomes valid, the destination buffer
// (output port dport, queue dq) is latched. In the next cycle the Ack-line
// answers: 1 if that queue has room for the whole transfer (BEATS flits of
// WR_WORDS words), 0 if not. In the same cycle the first flit is on the
// Data-line; it and the following BEATS-1 flits are written into the queue
// if the answer was 1 and dropped otherwise. The sender keeps refused data
// and sends it again later. The bank that receives is always the one that
// belongs to this input direction inside output port dport.
//
// After refusing a transfer for a queue, the port keeps refusing transfers
// for that queue until one arrives with the retry bit set; transfers already
// on their way when the sender learned of the refusal are thereby refused too
// and the order of the data is kept (see link_tx). The ack polarity and the
// retry rule are this implementation's choices.
//
// Timing: address seen in cycle t, ack and first flit in t+1, flit k in t+1+k.
// A new address is accepted every BEATS cycles at most, which is the rate the
// sender uses. tgt_free is the free space, in words, of every queue this port
// can write; tgt_ok marks the output ports that exist for this input.
module link_rx
  import noc_pkg::*;
#(
  parameter int unsigned WR_WORDS = 1,   // words per flit on this channel
  parameter int unsigned BEATS    = 1    // flits per transfer
) (
  input  logic               clk,
  input  logic               rst_n,
  input  link_fwd_t          fwd,
  output logic               ack_out,
  input  logic [OCC_W-1:0]   tgt_free [NPORT][NQ],
  input  logic               tgt_ok   [NPORT],
  output logic               wr_en,
  output port_e              wr_port,
  output logic [QIDX_W-1:0]  wr_q,
  output logic [FLIT_W-1:0]  wr_data,
  output logic [CNT_W-1:0]   acc_cnt,
  output logic [CNT_W-1:0]   ref_cnt
);

  localparam int unsigned BWD = BEATS * WR_WORDS;
  localparam int unsigned BCW = (BEATS > 1) ? $clog2(BEATS + 1) : 1;

  logic              p_valid;      // address latched, ack due this cycle
  logic              p_retry;
  port_e             p_port;
  logic [QIDX_W-1:0] p_q;
  logic [BCW-1:0]    hold;         // address cycles still to ignore
  logic              a_acc;        // current transfer accepted
  port_e             a_port;
  logic [QIDX_W-1:0] a_q;
  logic [BCW-1:0]    a_left;       // flits of the current transfer still to come
  logic              refuse [NPORT][NQ];
  logic              accept;

  always_comb begin
    accept = p_valid && tgt_ok[p_port]
          && (p_retry || !refuse[p_port][p_q])
          && (int'(tgt_free[p_port][p_q]) >= BWD);
    ack_out = accept;
    wr_en   = 1'b0;
    wr_port = p_port;
    wr_q    = p_q;
    wr_data = fwd.data;
    if (p_valid) begin
      wr_en = accept;
    end else if (a_left != '0) begin
      wr_en   = a_acc;
      wr_port = a_port;
      wr_q    = a_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_retry <= 1'b0;
      p_port  <= P_E;
      p_q     <= '0;
      hold    <= '0;
      a_acc   <= 1'b0;
      a_port  <= P_E;
      a_q     <= '0;
      a_left  <= '0;
      acc_cnt <= '0;
      ref_cnt <= '0;
      for (int p = 0; p < NPORT; p++)
        for (int q = 0; q < NQ; q++) refuse[p][q] <= 1'b0;
    end else begin
      // address stage
      if (hold != '0) begin
        hold    <= hold - 1'b1;
        p_valid <= 1'b0;
      end else if (fwd.av) begin
        p_valid <= 1'b1;
        p_retry <= fwd.retry;
        p_port  <= fwd.dport;
        p_q     <= fwd.dq;
        hold    <= BCW'(BEATS - 1);
      end else begin
        p_valid <= 1'b0;
      end
      // ack stage and the remaining flits
      if (p_valid) begin
        refuse[p_port][p_q] <= !accept;
        a_acc  <= accept;
        a_port <= p_port;
        a_q    <= p_q;
        a_left <= BCW'(BEATS - 1);
        if (accept) acc_cnt <= acc_cnt + 1'b1;
        else        ref_cnt <= ref_cnt + 1'b1;
      end else if (a_left != '0) begin
        a_left <= a_left - 1'b1;
      end
    end
  end

endmodule
