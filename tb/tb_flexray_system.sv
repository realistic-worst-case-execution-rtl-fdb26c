// tb_flexray_system: end-to-end test of four ECUs on one bus at the default
// size (L = 8 bytes, NS = 4 slots, T = 800 cycles per slot).
// Each ECU has its own clock; the periods differ from the nominal 10 ns by up
// to 0.14 % and the resets are released at different times.  ECU v owns slot
// v; ECU 0 is the synchronisation master.  A behavioural processor per ECU
// waits for its timer interrupt, clears it, reads the slot number, checks the
// receive buffer against the message that the owner of the previous slot
// stored two slots earlier, and stores its own message for the next slot
// when it owns that slot.  The run lasts five rounds.
// Checked besides the data: every transmission starts while all ECUs are in
// the sender's slot (in slot 0: the others wait for synchronisation) and no other ECU is sending; every receiver finishes the
// frame inside that slot and within 45 + 80*L sender cycles of the start.
// Counted mechanisms (each must occur): non-master timers stalling and being
// synchronised to (0, off) within 15 cycles of the master, resynchronisation at byte start sequences, timer
// interrupts, buffer parity switches, received frames.
`timescale 1ps/1ps
module tb_flexray_system;
  localparam int P = 4, L = 8, NS = 4, T = 800;
  localparam int ROUNDS = 5;
  localparam logic [31:0] BA = 32'h8000_0000;
  localparam int HALF [P] = '{5000, 5007, 4993, 5005};

  logic [P-1:0]        clk, rst_n;
  logic [P-1:0][31:0]  rs1_val, st_data, io_rdata, eev_in, iev, sr_wdata, sr, eca;
  logic [P-1:0][15:0]  imm;
  logic [P-1:0]        lw, sw, mem_sel, dev_sel, misaligned, wb_valid, sr_we, jisr;
  logic [P-1:0][1:0]   slot;
  logic [P-1:0][$clog2(T)-1:0] cy;
  logic [P-1:0]        ti_pending, tx_busy, frame_ok, frame_err;
  logic                fbus;
  logic [P-1:0]        waiting_v;

  flexray_system dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_tsync = 0, n_bsync = 0, n_ti = 0, n_par = 0, n_frames = 0, n_tx = 0;
  int max_lat_ps = 0;
  logic [31:0] sent [NS][L / 4];
  bit          sent_valid [NS];
  int          cur_tx_slot = -1, cur_tx_ecu = -1;
  realtime     t_start;
  int          rounds_done = 0;
  realtime     t_master_sync = 0;
  int          max_adj_ps = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL at %0t: %s", $realtime, msg);
  endtask

  initial begin
    #(longint'(ROUNDS + 2) * NS * T * 10100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  for (genvar v = 0; v < P; v++) begin : g_cpu
    logic c = 0, r = 0;
    logic [31:0] base = 0, sd = 0, srw = 0;
    logic [15:0] im = 0;
    logic l = 0, s = 0, wbv = 0, srwe = 0;
    bit waiting_q = 0, ovf_q = 0;
    int par_q = 0;

    always #(HALF[v]) c = ~c;
    assign clk[v] = c;
    assign waiting_v[v] = dut.g_ecu[v].u_ecu.u_fi.waiting;
    assign rst_n[v] = r;
    assign rs1_val[v] = base;
    assign imm[v] = im;
    assign lw[v] = l;
    assign sw[v] = s;
    assign st_data[v] = sd;
    assign eev_in[v] = '0;
    assign iev[v] = '0;
    assign wb_valid[v] = wbv;
    assign sr_we[v] = srwe;
    assign sr_wdata[v] = srw;

    task automatic store(int off, logic [31:0] data);
      @(negedge c);
      base = BA; im = 16'(off); sd = data; s = 1;
      @(negedge c);
      s = 0;
    endtask

    task automatic load(int off, output logic [31:0] data);
      @(negedge c);
      base = BA; im = 16'(off); l = 1;
      #1 data = io_rdata[v];
      @(negedge c);
      l = 0;
    endtask

    // mechanisms seen in this ECU
    always @(posedge c) if (r) begin
      if (dut.g_ecu[v].u_ecu.u_fi.waiting && !waiting_q) n_stall++;
      if (v == 0 && slot[v] == 0 && int'(cy[v]) == fr_pkg::calc_off(NS, T)) t_master_sync = $realtime;
      if (waiting_q && !dut.g_ecu[v].u_ecu.u_fi.waiting) begin
        // timer adjusted to (0, OFF) within 15 cycles of the master
        n_tsync++;
        checks++;
        if ($realtime - t_master_sync > 15 * 2 * HALF[v])
          fail($sformatf("ECU %0d synchronised %0t after the master", v, $realtime - t_master_sync));
        if (int'($realtime - t_master_sync) > max_adj_ps) max_adj_ps = int'($realtime - t_master_sync);
      end
      waiting_q <= dut.g_ecu[v].u_ecu.u_fi.waiting;
      if (dut.g_ecu[v].u_ecu.u_fi.rx_sync &&
          dut.g_ecu[v].u_ecu.u_fi.u_rx.state == fr_pkg::FB_BS1) n_bsync++;
      if (int'(dut.g_ecu[v].u_ecu.u_fi.par) != par_q) n_par++;
      par_q <= int'(dut.g_ecu[v].u_ecu.u_fi.par);
      if (dut.g_ecu[v].u_ecu.u_fi.ovf && !ovf_q) n_ti++;
      ovf_q <= dut.g_ecu[v].u_ecu.u_fi.ovf;
      if (frame_err[v]) fail($sformatf("frame error at ECU %0d", v));
      if (frame_ok[v]) begin
        n_frames++;
        checks++;
        if (int'(slot[v]) != cur_tx_slot)
          fail($sformatf("ECU %0d finished a frame in slot %0d, sent in slot %0d", v, slot[v], cur_tx_slot));
        checks++;
        if ($realtime - t_start > fr_pkg::calc_tc(L) * 2 * HALF[cur_tx_ecu])
          fail($sformatf("ECU %0d received after %0t", v, $realtime - t_start));
        if (int'($realtime - t_start) > max_lat_ps) max_lat_ps = int'($realtime - t_start);
      end
    end

    // transmission start: all ECUs must be in the sender's slot, bus free
    always @(posedge tx_busy[v]) if (r) begin
      n_tx++;
      cur_tx_slot = int'(slot[v]);
      cur_tx_ecu = v;
      t_start = $realtime - 2 * HALF[v];
      for (int u = 0; u < P; u++) begin
        checks++;
        // in slot 0 the other ECUs are still waiting for the master's TSS
        if (slot[v] == 0 && u != v) begin
          if (!waiting_v[u])
            fail($sformatf("ECU %0d not waiting for synchronisation in slot 0", u));
        end else if (slot[u] != slot[v]) fail($sformatf("ECU %0d in slot %0d while ECU %0d sends in slot %0d", u, slot[u], v, slot[v]));
        if (u != v && tx_busy[u]) fail("bus contention");
      end
    end

    // behavioural processor
    initial begin
      logic [31:0] d;
      int sl;
      repeat (3 + 2 * v) @(posedge c);
      #1 r = 1;
      store(2 * L, 32'(1) << v);
      forever begin
        wait (ti_pending[v]);
        store(2 * L + 4, 1);
        load(2 * L + 4, d);
        checks++;
        if (d[0]) fail("timer interrupt not cleared");
        sl = int'(d[15:8]);
        if (v == 0 && sl == 0) rounds_done++;
        // message received in the previous slot
        if (sent_valid[(sl + NS - 1) % NS]) begin
          for (int w = 0; w < L / 4; w++) begin
            load(L + 4 * w, d);
            checks++;
            if (d !== sent[(sl + NS - 1) % NS][w])
              fail($sformatf("ECU %0d slot %0d word %0d: %h expected %h", v, sl, w, d,
                             sent[(sl + NS - 1) % NS][w]));
          end
        end
        // own message for the next slot
        if ((sl + 1) % NS == v) begin
          for (int w = 0; w < L / 4; w++) begin
            d = {8'(v), 8'(rounds_done), 16'($urandom)};
            store(4 * w, d);
            sent[(sl + 1) % NS][w] = d;
          end
          sent_valid[(sl + 1) % NS] = 1;
        end
      end
    end
  end

  initial begin
    wait (rounds_done == ROUNDS);
    $display("stalls=%0d timer syncs=%0d byte resyncs=%0d timer irqs=%0d parity switches=%0d",
             n_stall, n_tsync, n_bsync, n_ti, n_par);
    $display("max timer adjustment after the master=%0d ps (bound 15 cycles)", max_adj_ps);
    $display("transmissions=%0d frames received=%0d max latency=%0d ps (bound %0d sender cycles)",
             n_tx, n_frames, max_lat_ps, fr_pkg::calc_tc(L));
    checks++;
    if (n_stall == 0 || n_tsync == 0 || n_bsync == 0 || n_ti == 0 || n_par == 0)
      fail("a mechanism never occurred");
    checks++;
    if (n_frames != P * n_tx || n_tx < (ROUNDS - 1) * NS) fail("frames missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
