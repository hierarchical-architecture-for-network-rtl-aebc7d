// Request-oriented weighted round-robin scheduler.
//
// N buffers share one physical channel. A sequence index walks over the
// buffers cyclically; buffers that do not request are skipped in the same
// cycle, so the grant goes to the next requesting buffer. A buffer with
// weight w keeps the grant for w consecutive data cycles before the index
// moves on, so its share of the channel is w over the sum of the weights.
// With weights A=1, B=2, C=2, D=1 and all requesting, the grant sequence is
// A B B C C D A ...
//
// One grant is issued in each cycle where en is high; a grant costs STEP
// units of weight (STEP is the burst length of the channel: 1 on L1 and on
// the SW_I side, 3 between two L2 switches). A weight below STEP still earns
// one grant per turn. The grant is combinational from req and the state, and
// the state advances at the clock edge of a granting cycle. The scheme is the
// design description's; the single-cycle skip search is this
// implementation's way of doing it.
module wrr_scheduler
  import noc_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned STEP = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [N-1:0]            req,
  input  logic [WGT_W-1:0]        weight [N],
  output logic                    gnt_valid,
  output logic [$clog2(N)-1:0]    gnt_idx
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0]    ptr;
  logic [WGT_W+1:0] used;
  logic             cont;

  always_comb begin
    int unsigned idx;
    idx       = 0;
    gnt_valid = 1'b0;
    gnt_idx   = ptr;
    cont      = 1'b0;
    if (req[ptr] && (int'(used) + STEP <= int'(weight[ptr]))) begin
      gnt_valid = 1'b1;
      cont      = 1'b1;
    end else begin
      for (int unsigned i = 1; i <= N; i++) begin
        idx = (int'(ptr) + i) % N;
        if (!gnt_valid && req[idx]) begin
          gnt_valid = 1'b1;
          gnt_idx   = IW'(idx);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      used <= '0;
    end else if (en && gnt_valid) begin
      ptr  <= gnt_idx;
      used <= cont ? used + (WGT_W+2)'(STEP) : (WGT_W+2)'(STEP);
    end
  end

endmodule
