// Self-checking test of the relay station: random traffic in both directions
// must come out unchanged exactly one cycle later, and reset must clear the
// forward valid bit and the ack.
module tb_relay_station;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  link_fwd_t fi, fo, fi_d;
  logic      ai, ao, ai_d;

  relay_station dut (.clk, .rst_n, .fwd_in(fi), .fwd_out(fo), .ack_in(ai), .ack_out(ao));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fi = '1; ai = 1'b1;
    #12;
    checks++;
    if (fo.av !== 1'b0 || ao !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      fi_d = fi; ai_d = ai;
      fi.av    = $urandom_range(1);
      fi.retry = $urandom_range(1);
      fi.dport = port_e'($urandom_range(4));
      fi.dq    = 2'($urandom_range(3));
      for (int k = 0; k < R; k++) fi.data[k*WORD_W +: WORD_W] = $urandom;
      ai = $urandom_range(1);
      #1;
      // before the edge the outputs still show the previous inputs
      if (n > 0) begin
        checks++;
        if (fo !== fi_d || ao !== ai_d) begin
          failures++; $display("FAIL cycle %0d: output is not the input of one cycle before", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
