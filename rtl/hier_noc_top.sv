// Hierarchical 2-D mesh network-on-chip.
//
// Level 1 (L1) is an NX x NY mesh of five-port virtual-circuit switches with
// one-word channels, one PE per switch. Every third position in x and in y
// (x mod 3 = 1 and y mod 3 = 1) holds, instead of an L1 switch and its PE, an
// interchange switch SW_I. Each SW_I has its local port joined to a switch of
// level 2 (L2), a second, coarser mesh of SW_L2 switches with four-word (R)
// channels. So long connections can leave L1, travel on the wide L2 mesh and
// come down again near their destination, like traffic taking a freeway.
//
// Geometry. A SW_I at L2 coordinates (i, j) keeps only two of its four mesh
// channels to L1: the vertical pair (N, S) when i + j is odd, where the
// horizontal channels are cut, and the horizontal pair (E, W) otherwise. The
// two L1 switches on those kept channels (SW_1I) use a four-word channel
// towards the SW_I and eight-word queues (Q = q x R) on the banks that talk to
// it, so they pack four one-word data into one L2 flit on the way up and
// unpack on the way down. A SW_I has eight-word queues everywhere. Two
// neighbouring SW_L2 are three L1 hops apart; their channels carry bursts of
// three four-word flits through NRS_L2 = 2 relay stations per direction, so
// one L2 transfer takes eight cycles, and their queues are 3Q = 24 words.
// Plain L1 switches have queues of q = QUNIT words.
//
// Interface. All connections are virtual circuits set up before use by
// writing address mapping tables through the cfg port: cfg_sel picks the kind
// of target (0: mesh switch, L1 or SW_I, at cfg_id = y*NX + x; 1: the PE
// interface at cfg_id; 2: the SW_L2 at cfg_id = j*NX2 + i), cfg_out/cfg_bank/
// cfg_q the table row. The processor side of every PE interface is brought
// out as the pe_* arrays indexed by y*NX + x (positions holding a SW_I have no
// PE and read as zero). stat_* reads the transfer and refusal counters of one
// output port of one switch or PE interface, combinationally.
//
// Choices of this implementation where the description is silent: the mesh
// size (17 x 17, the smallest that gives at least 250 PEs), the position of
// the interchange switches inside each 3 x 3 group, which of the SW_I's
// ports face which way, and the port naming (E = +x, N = +y).
module hier_noc_top
  import noc_pkg::*;
#(
  parameter int unsigned NX    = 17,   // L1 mesh width
  parameter int unsigned NY    = 17,   // L1 mesh height
  parameter int unsigned QUNIT = 2,    // L1 queue length q, words
  parameter int unsigned NIQW  = 8     // PE interface queue length, words
) (
  input  logic              clk,
  input  logic              rst_n,
  // connection set-up
  input  logic              cfg_we,
  input  logic [1:0]        cfg_sel,
  input  logic [15:0]       cfg_id,
  input  port_e             cfg_out,
  input  port_e             cfg_bank,
  input  logic [QIDX_W-1:0] cfg_q,
  input  map_entry_t        cfg_entry,
  // processors
  input  logic              pe_tx_we    [NX*NY],
  input  logic [QIDX_W-1:0] pe_tx_q     [NX*NY],
  input  logic [WORD_W-1:0] pe_tx_data  [NX*NY],
  output logic [OCC_W-1:0]  pe_tx_count [NX*NY][NQ],
  input  logic              pe_rx_pop   [NX*NY],
  input  logic [QIDX_W-1:0] pe_rx_q     [NX*NY],
  output logic              pe_rx_valid [NX*NY],
  output logic [WORD_W-1:0] pe_rx_data  [NX*NY],
  output logic [OCC_W-1:0]  pe_rx_count [NX*NY][NQ],
  // statistics
  input  logic [1:0]        stat_sel,
  input  logic [15:0]       stat_id,
  input  port_e             stat_port,
  output logic [CNT_W-1:0]  stat_txn,
  output logic [CNT_W-1:0]  stat_fail
);

  localparam int unsigned NN     = NX * NY;
  localparam int unsigned NX2    = (NX + 1) / 3;   // sites at x = 1, 4, 7, ...
  localparam int unsigned NY2    = (NY + 1) / 3;
  localparam int unsigned NL2    = NX2 * NY2;
  localparam int unsigned QBIG   = QUNIT * R;      // Q
  localparam int unsigned NRS_L2 = 2;
  localparam int unsigned L2_BEATS = 3;

  // ---------------- geometry ----------------
  function automatic bit is_site(int x, int y);
    return x >= 0 && y >= 0 && x < int'(NX) && y < int'(NY) && (x % 3 == 1) && (y % 3 == 1);
  endfunction

  // a SW_I keeps its vertical channels when i + j is odd
  function automatic bit site_vert(int x, int y);
    return (((x - 1) / 3 + (y - 1) / 3) % 2) == 1;
  endfunction

  function automatic int nbx(int x, int d);
    return (d == 0) ? x + 1 : (d == 2) ? x - 1 : x;
  endfunction
  function automatic int nby(int y, int d);
    return (d == 3) ? y + 1 : (d == 1) ? y - 1 : y;
  endfunction

  // does the mesh channel leaving (x, y) in direction d exist
  function automatic bit link_exists(int x, int y, int d);
    int ax, ay;
    bit vert_d;
    ax = nbx(x, d);
    ay = nby(y, d);
    vert_d = (d == 1) || (d == 3);
    if (ax < 0 || ay < 0 || ax >= int'(NX) || ay >= int'(NY)) return 1'b0;
    if (is_site(x, y)   && (site_vert(x, y)   != vert_d)) return 1'b0;
    if (is_site(ax, ay) && (site_vert(ax, ay) != vert_d)) return 1'b0;
    return 1'b1;
  endfunction

  // port of (x, y) that faces an interchange switch, 5 if none
  function automatic int face_of(int x, int y);
    if (is_site(x, y)) return 5;
    for (int d = 0; d < 4; d++)
      if (is_site(nbx(x, d), nby(y, d)) && link_exists(x, y, d)) return d;
    return 5;
  endfunction

  // words per flit on port p of (x, y)
  function automatic int unsigned pw_of(int x, int y, int p);
    if (is_site(x, y)) return R;
    return (face_of(x, y) == p) ? R : 1;
  endfunction

  // words per queue of bank i of output port o of (x, y)
  function automatic int unsigned qw_of(int x, int y, int k);
    int o, i, f;
    o = k / int'(NPORT);
    i = k % int'(NPORT);
    if (is_site(x, y)) return QBIG;
    f = face_of(x, y);
    return (o == f || i == f) ? QBIG : QUNIT;
  endfunction

  // ---------------- mesh switches and PE interfaces ----------------
  link_fwd_t        sw_in_fwd  [NN][NPORT];
  logic             sw_in_ack  [NN][NPORT];
  link_fwd_t        sw_out_fwd [NN][NPORT];
  logic             sw_out_ack [NN][NPORT];
  logic [CNT_W-1:0] sw_txn     [NN][NPORT];
  logic [CNT_W-1:0] sw_fail    [NN][NPORT];
  logic [CNT_W-1:0] ni_txn     [NN];
  logic [CNT_W-1:0] ni_fail    [NN];

  link_fwd_t        l2_in_fwd  [NL2][NPORT];
  logic             l2_in_ack  [NL2][NPORT];
  link_fwd_t        l2_out_fwd [NL2][NPORT];
  logic             l2_out_ack [NL2][NPORT];
  logic [CNT_W-1:0] l2_txn     [NL2][NPORT];
  logic [CNT_W-1:0] l2_fail    [NL2][NPORT];

  for (genvar Y = 0; Y < NY; Y++) begin : g_y
    for (genvar X = 0; X < NX; X++) begin : g_x
      localparam int N = Y * NX + X;

      vc_switch #(
        .PW     ('{pw_of(X, Y, 0), pw_of(X, Y, 1), pw_of(X, Y, 2), pw_of(X, Y, 3), pw_of(X, Y, 4)}),
        .BEATS  ('{default: 1}),
        .NRS    ('{default: 0}),
        .QWORDS ('{qw_of(X, Y, 0), qw_of(X, Y, 1), qw_of(X, Y, 2), qw_of(X, Y, 3), qw_of(X, Y, 4), qw_of(X, Y, 5), qw_of(X, Y, 6), qw_of(X, Y, 7), qw_of(X, Y, 8), qw_of(X, Y, 9), qw_of(X, Y, 10), qw_of(X, Y, 11), qw_of(X, Y, 12), qw_of(X, Y, 13), qw_of(X, Y, 14), qw_of(X, Y, 15), qw_of(X, Y, 16), qw_of(X, Y, 17), qw_of(X, Y, 18), qw_of(X, Y, 19), qw_of(X, Y, 20), qw_of(X, Y, 21), qw_of(X, Y, 22), qw_of(X, Y, 23), qw_of(X, Y, 24)})
      ) u_sw (
        .clk, .rst_n,
        .in_fwd    (sw_in_fwd[N]),
        .in_ack    (sw_in_ack[N]),
        .out_fwd   (sw_out_fwd[N]),
        .out_ack   (sw_out_ack[N]),
        .cfg_we    (cfg_we && cfg_sel == 2'd0 && cfg_id == 16'(N)),
        .cfg_out   (cfg_out),
        .cfg_bank  (cfg_bank),
        .cfg_q     (cfg_q),
        .cfg_entry (cfg_entry),
        .txn_cnt   (sw_txn[N]),
        .fail_cnt  (sw_fail[N])
      );

      // mesh channels
      for (genvar D = 0; D < 4; D++) begin : g_d
        if (link_exists(X, Y, D)) begin : g_link
          localparam int M = nby(Y, D) * NX + nbx(X, D);
          localparam int O = (D + 2) % 4;
          assign sw_in_fwd[N][D]  = sw_out_fwd[M][O];
          assign sw_out_ack[N][D] = sw_in_ack[M][O];
        end else begin : g_cut
          assign sw_in_fwd[N][D]  = '0;
          assign sw_out_ack[N][D] = 1'b0;
        end
      end

      if (is_site(X, Y)) begin : g_site
        // local port of the interchange switch goes to its SW_L2
        localparam int L = ((Y - 1) / 3) * NX2 + (X - 1) / 3;
        assign sw_in_fwd[N][P_L]  = l2_out_fwd[L][P_L];
        assign sw_out_ack[N][P_L] = l2_in_ack[L][P_L];
        assign l2_in_fwd[L][P_L]  = sw_out_fwd[N][P_L];
        assign l2_out_ack[L][P_L] = sw_in_ack[N][P_L];
        assign ni_txn[N]          = '0;
        assign ni_fail[N]         = '0;
        assign pe_tx_count[N]     = '{default: '0};
        assign pe_rx_count[N]     = '{default: '0};
        assign pe_rx_valid[N]     = 1'b0;
        assign pe_rx_data[N]      = '0;
      end else begin : g_pe
        pe_ni #(.TXQW(NIQW), .RXQW(NIQW)) u_ni (
          .clk, .rst_n,
          .tx_we     (pe_tx_we[N]),
          .tx_q      (pe_tx_q[N]),
          .tx_data   (pe_tx_data[N]),
          .tx_count  (pe_tx_count[N]),
          .rx_pop    (pe_rx_pop[N]),
          .rx_q      (pe_rx_q[N]),
          .rx_valid  (pe_rx_valid[N]),
          .rx_data   (pe_rx_data[N]),
          .rx_count  (pe_rx_count[N]),
          .out_fwd   (sw_in_fwd[N][P_L]),
          .out_ack   (sw_in_ack[N][P_L]),
          .in_fwd    (sw_out_fwd[N][P_L]),
          .in_ack    (sw_out_ack[N][P_L]),
          .cfg_we    (cfg_we && cfg_sel == 2'd1 && cfg_id == 16'(N)),
          .cfg_q     (cfg_q),
          .cfg_entry (cfg_entry),
          .txn_cnt   (ni_txn[N]),
          .fail_cnt  (ni_fail[N])
        );
      end
    end
  end

  // ---------------- level-2 mesh ----------------
  for (genvar J = 0; J < NY2; J++) begin : g_j
    for (genvar I = 0; I < NX2; I++) begin : g_i
      localparam int L = J * NX2 + I;

      vc_switch #(
        .PW     ('{default: R}),
        .BEATS  ('{L2_BEATS, L2_BEATS, L2_BEATS, L2_BEATS, 1}),
        .NRS    ('{NRS_L2, NRS_L2, NRS_L2, NRS_L2, 0}),
        .QWORDS ('{default: 3 * QBIG})
      ) u_l2 (
        .clk, .rst_n,
        .in_fwd    (l2_in_fwd[L]),
        .in_ack    (l2_in_ack[L]),
        .out_fwd   (l2_out_fwd[L]),
        .out_ack   (l2_out_ack[L]),
        .cfg_we    (cfg_we && cfg_sel == 2'd2 && cfg_id == 16'(L)),
        .cfg_out   (cfg_out),
        .cfg_bank  (cfg_bank),
        .cfg_q     (cfg_q),
        .cfg_entry (cfg_entry),
        .txn_cnt   (l2_txn[L]),
        .fail_cnt  (l2_fail[L])
      );

      for (genvar D = 0; D < 4; D++) begin : g_d
        localparam int NBI = (D == 0) ? I + 1 : (D == 2) ? I - 1 : I;
        localparam int NBJ = (D == 3) ? J + 1 : (D == 1) ? J - 1 : J;
        if (NBI >= 0 && NBJ >= 0 && NBI < int'(NX2) && NBJ < int'(NY2)) begin : g_link
          localparam int M = NBJ * NX2 + NBI;
          localparam int O = (D + 2) % 4;
          // relay stations from this switch's port D to the neighbour's port O
          link_fwd_t rs_fwd [NRS_L2+1];
          logic      rs_ack [NRS_L2+1];
          assign rs_fwd[0]         = l2_out_fwd[L][D];
          assign l2_out_ack[L][D]  = rs_ack[0];
          assign l2_in_fwd[M][O]   = rs_fwd[NRS_L2];
          assign rs_ack[NRS_L2]    = l2_in_ack[M][O];
          for (genvar S = 0; S < NRS_L2; S++) begin : g_rs
            relay_station u_rs (
              .clk, .rst_n,
              .fwd_in  (rs_fwd[S]),
              .fwd_out (rs_fwd[S+1]),
              .ack_in  (rs_ack[S+1]),
              .ack_out (rs_ack[S])
            );
          end
        end else begin : g_edge
          assign l2_in_fwd[L][D]  = '0;
          assign l2_out_ack[L][D] = 1'b0;
        end
      end
    end
  end

  // ---------------- statistics read-out ----------------
  always_comb begin
    stat_txn  = '0;
    stat_fail = '0;
    case (stat_sel)
      2'd0: if (int'(stat_id) < NN) begin
              stat_txn  = sw_txn[stat_id][stat_port];
              stat_fail = sw_fail[stat_id][stat_port];
            end
      2'd1: if (int'(stat_id) < NN) begin
              stat_txn  = ni_txn[stat_id];
              stat_fail = ni_fail[stat_id];
            end
      2'd2: if (int'(stat_id) < NL2) begin
              stat_txn  = l2_txn[stat_id][stat_port];
              stat_fail = l2_fail[stat_id][stat_port];
            end
      default: ;
    endcase
  end

endmodule
