// tb_f_interface: self-checking test of one f-interface at its default size
// (L = 8 bytes, NS = 4 slots, T = 800 cycles) with its sender looped back to
// its receiver.  A behavioural processor programs the schedule (slots 0 and
// 2 owned, so this interface is the synchronisation master), and in every
// slot waits for the timer interrupt, clears it, writes the message for the
// next slot into the send buffer and reads the receive buffer.  Checks: the
// message received in slot s is read by the processor in slot s+1 and equals
// what it wrote in slot s-1; transmission starts at local cycle OFF of owned
// slots only and ends inside the slot; slot length is T; the status word and
// the schedule register read back.
`timescale 1ns/1ps
module tb_f_interface;
  localparam int L = 8, NS = 4, T = 800;
  localparam int OFF = fr_pkg::calc_off(NS, T);
  logic clk = 0, rst_n = 0;
  logic io_sel = 0, io_we = 0;
  logic [4:0] io_addr = 0;
  logic [31:0] io_wdata = 0, io_rdata;
  logic ti_pending, fbus, s_out, par, tx_busy, rx_idle, frame_ok, frame_err, waiting, rx_sync;
  logic [1:0] slot;
  logic [9:0] cy;
  logic [31:0] sent [NS][L / 4];
  bit sent_valid [NS];
  int checks = 0, failures = 0, n_frames = 0, n_starts = 0, n_ti = 0;
  int last_ti_time;

  f_interface dut (.clk, .rst_n, .io_sel, .io_we, .io_addr, .io_wdata, .io_rdata, .ti_pending,
                   .fbus, .s_out, .slot, .cy, .par, .tx_busy, .rx_idle, .frame_ok, .frame_err,
                   .waiting, .rx_sync);

  assign fbus = s_out;
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL at %0t: %s = %0h expected %0h", $time, what, got, exp);
    end
  endtask

  task automatic io_wr(int addr, logic [31:0] data);
    @(negedge clk);
    io_sel = 1; io_we = 1; io_addr = 5'(addr); io_wdata = data;
    @(negedge clk);
    io_sel = 0; io_we = 0;
  endtask

  task automatic io_rd(int addr, output logic [31:0] data);
    @(negedge clk);
    io_sel = 1; io_we = 0; io_addr = 5'(addr);
    #1 data = io_rdata;
    @(negedge clk);
    io_sel = 0;
  endtask

  // transmissions start at cycle OFF of owned slots and finish in the slot
  logic tx_busy_q = 0;
  always @(posedge clk) if (rst_n) begin
    tx_busy_q <= tx_busy;
    if (tx_busy && !tx_busy_q) begin
      n_starts++;
      chk("transmit start cycle", int'(cy), OFF + 1);
      chk("transmit slot owned", int'(slot == 0 || slot == 2), 1);
    end
    if (frame_ok) begin
      n_frames++;
      checks++;
      if (cy < OFF + fr_pkg::calc_tc(L) - 60 || cy > OFF + fr_pkg::calc_tc(L)) begin
        failures++;
        $display("FAIL: frame done at cycle %0d", cy);
      end
    end
    if (frame_err) begin failures++; $display("FAIL: frame error"); end
  end

  initial begin
    logic [31:0] d;
    int s;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    io_wr(2 * L, 32'b0101);
    io_rd(2 * L, d);
    chk("schedule read back", d, 32'b0101);
    for (int k = 0; k < 4 * NS + 1; k++) begin
      wait (ti_pending);
      n_ti++;
      if (k > 1) chk("slot length", ($time - last_ti_time) / 10, T);
      last_ti_time = $time;
      io_wr(2 * L + 4, 32'h1);
      io_rd(2 * L + 4, d);
      chk("ti cleared", d[0], 0);
      s = int'(d[15:8]);
      chk("status parity", d[1], s % 2);
      // read what was received in the previous slot
      if (sent_valid[(s + NS - 1) % NS]) begin
        for (int w = 0; w < L / 4; w++) begin
          io_rd(L + 4 * w, d);
          chk("received word", d, sent[(s + NS - 1) % NS][w]);
        end
      end
      // prepare the message for the next slot
      for (int w = 0; w < L / 4; w++) begin
        d = $urandom;
        io_wr(4 * w, d);
        sent[(s + 1) % NS][w] = d;
      end
      sent_valid[(s + 1) % NS] = ((s + 1) % NS == 0) || ((s + 1) % NS == 2);
      for (int w = 0; w < L / 4; w++) begin
        io_rd(4 * w, d);
        chk("send buffer read back", d, sent[(s + 1) % NS][w]);
      end
    end
    chk("frames seen", int'(n_frames >= 6), 1);
    chk("starts equal frames", n_starts, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
