// Self-checking test of the output and input port controllers (link_tx,
// link_rx) on the two kinds of channel of the hierarchical platform:
//   L1: one-word flits, single transfers, no relay stations, 2-word queues
//   L2: four-word flits, bursts of three, two relay stations, 24-word queues
// See tb_link_env for what is checked.
module tb_link;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c1, f1, c2, f2;
  logic d1, d2;

  tb_link_env #(.RDW(1), .BEATS(1), .NRS(0), .SRCQW(8), .DSTQW(2), .FLITS(80), .W0(1), .W1(2))
    u_l1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  tb_link_env #(.RDW(4), .BEATS(3), .NRS(2), .SRCQW(24), .DSTQW(24), .FLITS(36), .W0(3), .W1(6))
    u_l2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2);
    $finish;
  end
endmodule
