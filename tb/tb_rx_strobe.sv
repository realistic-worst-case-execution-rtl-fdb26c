// tb_rx_strobe: self-checking test of the bit-phase counter.
// Applies sync at random moments and checks that strobe comes exactly four
// cycles after each sync, then every eight cycles, and never in a sync cycle.
`timescale 1ns/1ps
module tb_rx_strobe;
  logic clk = 0, rst_n = 0, sync = 0, strobe;
  int checks = 0, failures = 0;
  int since;   // cycles since the last sync

  rx_strobe dut (.clk, .rst_n, .sync, .strobe);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sync  = 1;
    since = 0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      // model of the counter value after this edge
      since = sync ? 0 : since + 1;
      #1 sync = ($urandom_range(0, 40) == 0);
      #1;
      checks++;
      if (strobe != (!sync && (since % 8 == 4))) begin
        failures++;
        $display("FAIL at %0d: strobe=%0d sync=%0d, %0d cycles after sync", i, strobe, sync, since);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
