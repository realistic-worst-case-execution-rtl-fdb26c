// tb_rx_fsm: self-checking test of the receiver automaton together with its
// front end (rx_voter) and bit-phase counter (rx_strobe).
// A behavioural sender on its own clock puts 8 copies of every bit of the
// frame 0 1 (1 0 byte)* 0 1 on the bus.  The sender clock is 0.15 % slower
// or faster than the receiver clock, or jittered within that band, and the
// start phase is random.  The test checks every byte written to the receive
// buffer, one frame_ok per frame, one sync at the start and one per byte
// start sequence, the transmission time bound 45 + 80*L sender cycles from
// start to frame_ok, and that a frame with a wrong FSS bit is rejected (its later falling edges may
// raise further errors).
`timescale 1ps/1ps
module tb_rx_fsm;
  localparam int L = 8;
  localparam int TREF = 10000;   // nominal period, ps
  logic clk = 0, rst_n = 0, fbus = 1;
  logic v, v_fall, strobe, sync, tss_det, rb_we, idle, frame_ok, frame_err;
  logic [2:0] rb_addr;
  logic [7:0] rb_wdata;
  fr_pkg::frame_bit_e state;
  logic [7:0] rb_model [L];
  int checks = 0, failures = 0;
  int n_ok = 0, n_err = 0, n_sync = 0;
  int sender_period = TREF;

  rx_voter  u_v (.clk, .rst_n, .fbus, .v, .v_fall);
  rx_strobe u_s (.clk, .rst_n, .sync, .strobe);
  rx_fsm #(.L(L)) dut (.clk, .rst_n, .v, .v_fall, .strobe, .sync, .tss_det, .rb_we,
                       .rb_addr, .rb_wdata, .idle, .frame_ok, .frame_err, .state);

  always #(TREF / 2) clk = ~clk;

  always @(posedge clk) begin
    if (rb_we) rb_model[rb_addr] <= rb_wdata;
    if (frame_ok) n_ok++;
    if (frame_err) n_err++;
    if (sync) n_sync++;
  end

  initial begin
    #(TREF * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural sender: one bus bit per sender cycle, drift or jitter mode
  task automatic send_frame(input logic [7:0] m [L], input bit bad_fss, input int mode);
    bit frame[$];
    frame.push_back(0); frame.push_back(!bad_fss);
    for (int i = 0; i < L; i++) begin
      frame.push_back(1); frame.push_back(0);
      for (int b = 7; b >= 0; b--) frame.push_back(m[i][b]);
    end
    frame.push_back(0); frame.push_back(1);
    foreach (frame[i]) begin
      for (int c = 0; c < 8; c++) begin
        if (c == 0) fbus = frame[i];
        case (mode)
          0: #(TREF + 15);
          1: #(TREF - 15);
          default: #(TREF - 15 + $urandom_range(0, 30));
        endcase
      end
    end
    fbus = 1;
  endtask

  initial begin
    logic [7:0] msg [L];
    realtime t0;
    int sync0, ok0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      bit bad;
      bad = (k == 5);
      for (int i = 0; i < L; i++) msg[i] = 8'($urandom);
      repeat ($urandom_range(5, 40)) @(posedge clk);
      #($urandom_range(0, TREF - 1));
      sync0 = n_sync; ok0 = n_ok;
      // the sender's start signal is one sender cycle before S changes
      t0 = $realtime - TREF;
      send_frame(msg, bad, k % 3);
      if (!bad) begin
        wait (n_ok != ok0);
        checks++;
        if ($realtime - t0 > fr_pkg::calc_tc(L) * (TREF + 15)) begin
          failures++;
          $display("FAIL: frame %0d took %0t, bound %0d sender cycles", k, $realtime - t0,
                   fr_pkg::calc_tc(L));
        end
        for (int i = 0; i < L; i++) begin
          checks++;
          if (rb_model[i] !== msg[i]) begin
            failures++;
            $display("FAIL: frame %0d byte %0d = %h expected %h", k, i, rb_model[i], msg[i]);
          end
        end
        checks++;
        if (n_sync - sync0 != L + 1) begin
          failures++;
          $display("FAIL: %0d syncs in frame %0d, expected %0d", n_sync - sync0, k, L + 1);
        end
      end else begin
        repeat (20) @(posedge clk);
      end
      repeat (20) @(posedge clk);
      checks++;
      if (!idle) begin failures++; $display("FAIL: receiver not idle after frame %0d", k); end
    end
    checks++;
    if (n_ok != 11 || n_err < 1) begin
      failures++;
      $display("FAIL: frame_ok=%0d frame_err=%0d", n_ok, n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
