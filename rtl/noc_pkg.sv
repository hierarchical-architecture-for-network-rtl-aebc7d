// Shared types and constants of the hierarchical virtual-circuit NoC.
//
// A physical channel between two switches carries three groups of wires: an
// Address-line naming the destination buffer in the next switch, a Data-line
// and a one-bit Ack-line running back. The forward groups are bundled here in
// link_fwd_t; the ack is a separate wire. The Data-line is declared at the L2
// width (R words); L1 channels use only the lowest word.
//
// Numbers from the design description: five ports per switch, four
// virtual-channel queues per buffer bank (channel width factor 4), an L2 to L1
// channel width ratio R = 4. The 32-bit word and the 4-bit weight field are
// this implementation's own choices.
package noc_pkg;

  localparam int unsigned WORD_W = 32;            // width of one word
  localparam int unsigned R      = 4;             // L2 width / L1 width, in words
  localparam int unsigned FLIT_W = R * WORD_W;    // widest Data-line
  localparam int unsigned NPORT  = 5;             // E, S, W, N, L
  localparam int unsigned NQ     = 4;             // channel width factor
  localparam int unsigned QIDX_W = $clog2(NQ);
  localparam int unsigned WGT_W  = 4;             // round-robin weight field
  localparam int unsigned CNT_W  = 32;            // statistics counters
  localparam int unsigned OCC_W  = 8;             // word counts inside a bank

  // Port numbering. N is the +y neighbour, E the +x neighbour.
  typedef enum logic [2:0] {
    P_E = 3'd0,
    P_S = 3'd1,
    P_W = 3'd2,
    P_N = 3'd3,
    P_L = 3'd4
  } port_e;

  // Forward half of a physical channel.
  typedef struct packed {
    logic                 av;     // Address-line valid (held for a whole burst)
    logic                 retry;  // first transfer after a refused one
    port_e                dport;  // output port of the destination buffer
    logic [QIDX_W-1:0]    dq;     // queue of the destination buffer
    logic [FLIT_W-1:0]    data;   // Data-line
  } link_fwd_t;

  // One row of a switch's address mapping table: where the buffer's data goes
  // in the next switch and how many data cycles it may use per round.
  typedef struct packed {
    logic                 valid;
    port_e                dport;
    logic [QIDX_W-1:0]    dq;
    logic [WGT_W-1:0]     weight;
  } map_entry_t;

  // Port on the other side of a channel leaving through port p.
  function automatic port_e opposite(port_e p);
    case (p)
      P_E:     return P_W;
      P_W:     return P_E;
      P_N:     return P_S;
      P_S:     return P_N;
      default: return P_L;
    endcase
  endfunction

endpackage
