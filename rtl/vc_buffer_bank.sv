// Buffer bank of one output port: a two-port memory split into NQ
// virtual-channel queues of QW words each.
//
// Every output port of a switch holds one bank per input direction, and a
// bank only ever receives data from that one direction. The bank memory is
// divided into NQ equal circular queues; each queue is the buffer of one
// virtual channel. One write port serves the input side and one read port the
// output side, so a write and a read can happen in the same cycle.
//
// Widths: the input channel brings WR_WORDS words per write and the output
// channel takes RD_WORDS words per read. A bank between a one-word L1 channel
// and a four-word L2 channel therefore packs or unpacks flits simply by being
// written and read at different widths.
//
// Timing: a write is stored at the end of the cycle. A read returns its data
// one cycle after rd_en (registered, like an SRAM). Reading does not remove
// data; pop_en removes pop_words words from the head of a queue, which the
// output port does only once the next switch has acknowledged them. rd_off is
// counted in words from the current head. count[] is the number of words held.
// The queue organisation and the two ports follow the design description;
// the fixed equal split into queues and the word-wide memory are this
// implementation's choices.
module vc_buffer_bank
  import noc_pkg::*;
#(
  parameter int unsigned NQ_B     = NQ,  // queues in this bank
  parameter int unsigned QW       = 2,   // words per queue
  parameter int unsigned WR_WORDS = 1,   // words per write
  parameter int unsigned RD_WORDS = 1    // words per read
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // write port (input side)
  input  logic                      wr_en,
  input  logic [$clog2(NQ_B)-1:0]   wr_q,
  input  logic [FLIT_W-1:0]         wr_data,
  // read port (output side)
  input  logic                      rd_en,
  input  logic [$clog2(NQ_B)-1:0]   rd_q,
  input  logic [OCC_W-1:0]          rd_off,
  output logic [FLIT_W-1:0]         rd_data,
  // release of acknowledged data
  input  logic                      pop_en,
  input  logic [$clog2(NQ_B)-1:0]   pop_q,
  input  logic [OCC_W-1:0]          pop_words,
  // status
  output logic [OCC_W-1:0]          count [NQ_B]
);

  localparam int unsigned PTR_W = (QW > 1) ? $clog2(QW) : 1;

  logic [WORD_W-1:0] mem [NQ_B*QW];
  logic [PTR_W-1:0]  head [NQ_B];
  logic [PTR_W-1:0]  tail [NQ_B];

  // (a + b) mod QW for a < QW and b < 2*QW
  function automatic logic [PTR_W-1:0] wrap(input logic [PTR_W-1:0] a, input int unsigned b);
    int unsigned s;
    s = int'(a) + b;
    if (s >= QW) s = s - QW;
    if (s >= QW) s = s - QW;
    return PTR_W'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int unsigned k = 0; k < WR_WORDS; k++)
        mem[int'(wr_q)*QW + int'(wrap(tail[wr_q], k))] <= wr_data[k*WORD_W +: WORD_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else if (rd_en) begin
      rd_data <= '0;
      for (int unsigned k = 0; k < RD_WORDS; k++)
        rd_data[k*WORD_W +: WORD_W] <= mem[int'(rd_q)*QW + int'(wrap(head[rd_q], int'(rd_off) + k))];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ_B; q++) begin
        head[q]  <= '0;
        tail[q]  <= '0;
        count[q] <= '0;
      end
    end else begin
      for (int q = 0; q < NQ_B; q++) begin
        logic [OCC_W-1:0] c;
        c = count[q];
        if (wr_en && wr_q == q) begin
          tail[q] <= wrap(tail[q], WR_WORDS);
          c = c + OCC_W'(WR_WORDS);
        end
        if (pop_en && pop_q == q) begin
          head[q] <= wrap(head[q], int'(pop_words));
          c = c - pop_words;
        end
        count[q] <= c;
      end
    end
  end

  // A write must fit and a pop may only remove what is there.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!wr_en || int'(count[wr_q]) + WR_WORDS <= QW)
        else $error("vc_buffer_bank: write into a full queue");
      assert (!pop_en || pop_words <= count[pop_q])
        else $error("vc_buffer_bank: pop of more words than held");
    end
  end

endmodule
