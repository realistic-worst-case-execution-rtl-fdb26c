// tb_tx_fsm: self-checking test of the sender.
// Sends random messages and compares the sender register, cycle by cycle,
// with the expected bus waveform: each bit of the frame
// 0 1 (1 0 byte)* 0 1 repeated eight times, bytes MSB first.  Checks that busy
// lasts exactly 8*(10*L+4) cycles and that S returns to the idle value 1.
`timescale 1ns/1ps
module tb_tx_fsm;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, start = 0, s_out, busy;
  logic [1:0] sb_addr;
  logic [7:0] sb_rdata;
  logic [7:0] msg [L];
  fr_pkg::frame_bit_e state;
  int checks = 0, failures = 0;

  tx_fsm #(.L(L)) dut (.clk, .rst_n, .start, .sb_addr, .sb_rdata, .s_out, .busy, .state);

  assign sb_rdata = msg[sb_addr];

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_check();
    bit frame[$];
    int busy_cycles = 0;
    frame.push_back(0); frame.push_back(1);
    for (int i = 0; i < L; i++) begin
      frame.push_back(1); frame.push_back(0);
      for (int b = 7; b >= 0; b--) frame.push_back(msg[i][b]);
    end
    frame.push_back(0); frame.push_back(1);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < frame.size() * 8; i++) begin
      checks++;
      if (s_out !== frame[i / 8]) begin
        failures++;
        $display("FAIL: cycle %0d of frame, S=%0d expected %0d", i, s_out, frame[i / 8]);
      end
      if (busy) busy_cycles++;
      @(negedge clk);
    end
    checks++;
    if (busy_cycles != 8 * (10 * L + 4) || busy) begin
      failures++;
      $display("FAIL: busy for %0d cycles, expected %0d", busy_cycles, 8 * (10 * L + 4));
    end
    repeat (10) begin
      checks++;
      if (s_out !== 1'b1) begin failures++; $display("FAIL: S not idle"); end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      for (int i = 0; i < L; i++) msg[i] = 8'($urandom);
      if (k == 0) begin msg[0] = 8'h00; msg[1] = 8'hFF; end
      send_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
