// tb_fi_timer: self-checking test of the slot timer.
// Two timers run side by side with small parameters (T = 20, NS = 4,
// OFF = 5): a master and a non-master.  A reference model predicts (slot, cy)
// of both every cycle.  Checks that the master wraps every T cycles through
// all slots, that the non-master stops at (NS-1, T-1) and jumps to (0, OFF) on
// sync_in, that ti pulses once at each overflow (and only once while the
// non-master is stalled), that par is slot bit 0, and that ti_pending is set
// by ti and cleared by clr.
`timescale 1ns/1ps
module tb_fi_timer;
  localparam int T = 20, NS = 4, OFF = 5;
  logic clk = 0, rst_n = 0;
  logic sync_in = 0, clr_m = 0, clr_s = 0;
  logic [4:0] cy_m, cy_s;
  logic [1:0] slot_m, slot_s;
  logic par_m, par_s, ovf_m, ovf_s, wait_m, wait_s, ti_m, ti_s, tp_m, tp_s;
  int checks = 0, failures = 0;
  int m_cy, m_slot, s_cy, s_slot, n_ti_s = 0, n_stall = 0, n_sync = 0;
  bit tp_model_m;

  fi_timer #(.T(T), .NS(NS), .OFF(OFF)) u_m (.clk, .rst_n, .master(1'b1), .sync_in(1'b0),
    .clr(clr_m), .cy(cy_m), .slot(slot_m), .par(par_m), .ovf(ovf_m), .waiting(wait_m),
    .ti(ti_m), .ti_pending(tp_m));
  fi_timer #(.T(T), .NS(NS), .OFF(OFF)) u_s (.clk, .rst_n, .master(1'b0), .sync_in,
    .clr(clr_s), .cy(cy_s), .slot(slot_s), .par(par_s), .ovf(ovf_s), .waiting(wait_s),
    .ti(ti_s), .ti_pending(tp_s));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL at %0t: %s = %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    bit s_stalled_prev;
    m_cy = T - 1; m_slot = NS - 1; s_cy = T - 1; s_slot = NS - 1;
    tp_model_m = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    s_stalled_prev = 1;
    for (int i = 0; i < 1200; i++) begin
      // stimulus for this cycle
      sync_in = (s_cy == T - 1 && s_slot == NS - 1) && ($urandom_range(0, 9) == 0);
      clr_m = ($urandom_range(0, 30) == 0);
      clr_s = 0;
      #1;
      chk("master cy", cy_m, m_cy);
      chk("master slot", slot_m, m_slot);
      chk("master par", par_m, m_slot % 2);
      chk("master ti", ti_m, (m_cy == T - 1) && i > 0);
      chk("master ti_pending", tp_m, tp_model_m);
      chk("slave cy", cy_s, s_cy);
      chk("slave slot", slot_s, s_slot);
      chk("slave waiting", wait_s, s_cy == T - 1 && s_slot == NS - 1);
      chk("slave ti", ti_s, (s_cy == T - 1) && !s_stalled_prev);
      if (ti_s) n_ti_s++;
      if (wait_s) n_stall++;
      @(posedge clk);
      // reference model update
      if (m_cy == T - 1 && i > 0) tp_model_m = 1;
      else if (clr_m) tp_model_m = 0;
      s_stalled_prev = (s_cy == T - 1);
      if (m_cy == T - 1) begin m_cy = 0; m_slot = (m_slot + 1) % NS; end
      else m_cy++;
      if (s_cy == T - 1 && s_slot == NS - 1) begin
        if (sync_in) begin s_cy = OFF; s_slot = 0; n_sync++; end
      end else if (s_cy == T - 1) begin s_cy = 0; s_slot++; end
      else s_cy++;
      #1;
    end
    checks++;
    if (n_sync < 3 || n_stall < 10 || n_ti_s < 3) begin
      failures++;
      $display("FAIL: mechanisms not seen: sync=%0d stall=%0d ti=%0d", n_sync, n_stall, n_ti_s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
