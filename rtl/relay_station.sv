// Relay station on a level-2 channel.
//
// The long channels between two L2 switches are cut into one-cycle segments
// by relay stations. A relay station is not a switch: it holds one L2 flit
// (four words) together with its address bits and passes it on in the next
// cycle, and it registers the Ack-line on its way back. Two of them per L2
// channel give the eight-cycle L2 transaction of the design description
// (grant, three address cycles, ack and data in cycles five to seven,
// release in cycle eight).
//
// Interface: fwd_in/fwd_out is the forward half of the channel, ack_in comes
// from the receiving side and ack_out goes to the sending side. Latency is one
// cycle in each direction. Reset clears both registers.
module relay_station
  import noc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  link_fwd_t fwd_in,
  output link_fwd_t fwd_out,
  input  logic      ack_in,
  output logic      ack_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_out <= '0;
      ack_out <= 1'b0;
    end else begin
      fwd_out <= fwd_in;
      ack_out <= ack_in;
    end
  end

endmodule
