// tb_rx_voter: self-checking test of the receiver front end.
// Drives a random bus with frequent short glitches and compares v and v_fall
// after every clock edge with a reference majority of the samples taken one
// to five cycles earlier.  Also checks that a single- and a two-cycle glitch
// on an idle bus never reach v while a three-cycle pulse does.
`timescale 1ns/1ps
module tb_rx_voter;
  logic clk = 0, rst_n = 0, fbus = 1, v, v_fall;
  int checks = 0, failures = 0;
  bit hist[$];
  bit v_prev;

  rx_voter dut (.clk, .rst_n, .fbus, .v, .v_fall);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_v();
    int ones = 0;
    for (int d = 1; d <= 5; d++) ones += hist[hist.size() - 1 - d];
    return ones >= 3;
  endfunction

  task automatic step(bit b);
    fbus = b;
    @(posedge clk);
    hist.push_back(fbus);
    #1;
  endtask

  task automatic pulse_test(int width, bit expect_seen);
    bit seen = 0;
    repeat (8) step(1);
    repeat (width) begin step(0); seen |= !v; end
    repeat (8) begin step(1); seen |= !v; end
    checks++;
    if (seen != expect_seen) begin
      failures++;
      $display("FAIL: %0d-cycle low pulse seen=%0d", width, seen);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 6; i++) hist.push_back(1);
    v_prev = 1;
    for (int i = 0; i < 3000; i++) begin
      bit b;
      // runs of random length, some only one or two cycles long
      b = ($urandom_range(0, 3) == 0) ? !hist[hist.size() - 1] : hist[hist.size() - 1];
      step(b);
      checks++;
      if (v != ref_v() || v_fall != (v_prev && !v)) begin
        failures++;
        $display("FAIL at %0d: v=%0d ref=%0d v_fall=%0d hist=%p r=%b rh=%b sh=%b", i, v, ref_v(), v_fall, hist, dut.r, dut.r_hat, dut.sh);
      end
      v_prev = v;
    end
    pulse_test(1, 0);
    pulse_test(2, 0);
    pulse_test(3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
