// fi_timer: slot timer of the f-interface.
//
// The low-order part cy counts the cycles of a slot modulo T, the high-order
// part slot counts the slot index modulo NS.  After reset the timer holds
// (NS-1, T-1).  The timer of the synchronisation master (the ECU that sends
// in slot 0) always keeps counting.  Every other timer stalls when it reaches
// (NS-1, T-1) and waits; when the receiver then detects the transmission
// start sequence of the master's slot-0 frame (sync_in), it jumps to
// (0, OFF), the value the master had when it started to send.  This realigns
// all ECUs once per round.
//
// ovf is the carry from cy into slot (cy = T-1).  Its rising edge is the
// timer interrupt ti; ti_pending keeps it until software clears it with clr.
// par is bit 0 of slot and selects the bus-side buffers.
//
// Interface: master and sync_in are sampled at the clock edge; all outputs
// are registered or decoded from registers.  Slot boundaries come every T
// cycles; after a sync the first slot has T-OFF cycles left.
//
// Counter layout, the stall-and-wait rule, the jump to (0, off) and
// ti = ovf & !ovf_prev follow the described timer.  The pending flag with a
// software clear is the simple extra hardware the description mentions; its
// register interface is a choice of this design.
module fi_timer #(
  parameter int unsigned T   = 800,
  parameter int unsigned NS  = 4,
  parameter int unsigned OFF = fr_pkg::calc_off(NS, T),
  localparam int unsigned CW = $clog2(T),
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          master,
  input  logic          sync_in,
  input  logic          clr,
  output logic [CW-1:0] cy,
  output logic [SW-1:0] slot,
  output logic          par,
  output logic          ovf,
  output logic          waiting,
  output logic          ti,
  output logic          ti_pending
);

  logic ovf_q;

  initial begin
    if (NS % 2 != 0) $error("fi_timer: NS must be even");
    if (OFF >= T)    $error("fi_timer: OFF must be below T");
  end

  assign ovf     = (cy == CW'(T - 1));
  assign waiting = !master && ovf && (slot == SW'(NS - 1));
  assign par     = slot[0];
  assign ti      = ovf && !ovf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cy         <= CW'(T - 1);
      slot       <= SW'(NS - 1);
      ovf_q      <= 1'b1;
      ti_pending <= 1'b0;
    end else begin
      ovf_q <= ovf;
      if (waiting) begin
        if (sync_in) begin
          slot <= '0;
          cy   <= CW'(OFF);
        end
      end else if (ovf) begin
        cy   <= '0;
        slot <= (slot == SW'(NS - 1)) ? '0 : slot + SW'(1);
      end else begin
        cy <= cy + CW'(1);
      end
      if (ti)       ti_pending <= 1'b1;
      else if (clr) ti_pending <= 1'b0;
    end
  end

  // counter ranges; a stalled timer only leaves (NS-1, T-1) by synchronisation
  a_range: assert property (@(posedge clk) disable iff (!rst_n) int'(cy) < T && int'(slot) < NS);
  a_stall: assert property (@(posedge clk) disable iff (!rst_n)
                            waiting && !sync_in |=> cy == CW'(T - 1) && slot == SW'(NS - 1));

endmodule
