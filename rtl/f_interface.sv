// f_interface: FlexRay-like bus interface of one ECU.
//
// The interface connects a processor to the time-triggered bus.  It contains
// the serial sender (tx_fsm) with the sender register S, the serial receiver
// (rx_voter, rx_strobe, rx_fsm), the double send/receive buffers, the slot
// timer and the configuration registers.  Time is divided into rounds of NS
// slots of T cycles.  The schedule register holds one bit per slot: bit s set
// means this ECU owns slot s.  When the local timer reaches cycle OFF of an
// owned slot the sender transmits the bus-side send buffer sb[par].  The
// receiver is always listening (the sender also receives its own frame) and
// writes what it receives into rb[par].  The owner of slot 0 is the
// synchronisation master; the other ECUs stop their timers at the end of each
// round and restart them at (0, OFF) on the start of the master's frame.
//
// Processor port (memory-mapped, K = 2*L + 4*C bytes, C = 2 words, word
// aligned accesses, byte offset io_addr, combinational read):
//   0      .. L-1     send buffer sb[!par]      (read/write)
//   L      .. 2L-1    receive buffer rb[!par]   (read; writes ignored)
//   2L                schedule register, bits NS-1:0 (read/write)
//   2L+4              control/status: write bit 0 = 1 clears the pending
//                     timer interrupt; read {cy[15:0], slot[7:0], 4'b0,
//                     rx_idle, tx_busy, par, ti_pending}
// ti_pending is the timer interrupt request to the processor.
//
// Bus port: s_out is register S (idle 1); fbus is the wired-AND of all S
// registers, sampled asynchronously.
//
// The components, the parity rule, the transmission start at local cycle off
// and the synchronisation rule follow the described interface.  The register
// map of the configuration and control words is a choice of this design.
module f_interface #(
  parameter int unsigned L   = 8,
  parameter int unsigned NS  = 4,
  parameter int unsigned T   = 800,
  parameter int unsigned OFF = fr_pkg::calc_off(NS, T),
  localparam int unsigned C  = 2,
  localparam int unsigned K  = 2 * L + 4 * C,
  localparam int unsigned KW = $clog2(K),
  localparam int unsigned CW = $clog2(T),
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          io_sel,
  input  logic          io_we,
  input  logic [KW-1:0] io_addr,
  input  logic [31:0]   io_wdata,
  output logic [31:0]   io_rdata,
  output logic          ti_pending,
  // bus side
  input  logic          fbus,
  output logic          s_out,
  // observation
  output logic [SW-1:0] slot,
  output logic [CW-1:0] cy,
  output logic          par,
  output logic          tx_busy,
  output logic          rx_idle,
  output logic          frame_ok,
  output logic          frame_err,
  output logic          waiting,
  output logic          rx_sync
);

  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned WW = (L / 4 > 1) ? $clog2(L / 4) : 1;

  initial begin
    if (!fr_pkg::slot_fits(T, L, OFF))
      $warning("f_interface: T=%0d is too short for L=%0d, NS=%0d, OFF=%0d", T, L, NS, OFF);
  end

  logic [NS-1:0] sched;
  logic          v, v_fall, strobe, tss_det, ti, ovf, tx_start, clr_ti;
  fr_pkg::frame_bit_e rx_state, tx_state;   // kept for debug visibility
  logic          rb_we;
  logic [AW-1:0] rb_addr, sb_addr;
  logic [7:0]    rb_wdata, sb_rdata;
  logic [31:0]   p_sb_rdata, p_rb_rdata;
  logic          in_sb, in_rb, at_sched, at_ctrl;

  // address decode of the processor port
  assign in_sb    = (int'(io_addr) < L);
  assign in_rb    = (int'(io_addr) >= L) && (int'(io_addr) < 2 * L);
  assign at_sched = (int'(io_addr) == 2 * L);
  assign at_ctrl  = (int'(io_addr) == 2 * L + 4);
  assign clr_ti   = io_sel && io_we && at_ctrl && io_wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          sched <= '0;
    else if (io_sel && io_we && at_sched) sched <= io_wdata[NS-1:0];
  end

  always_comb begin
    io_rdata = '0;
    if (in_sb)         io_rdata = p_sb_rdata;
    else if (in_rb)    io_rdata = p_rb_rdata;
    else if (at_sched) io_rdata = 32'(sched);
    else if (at_ctrl)  io_rdata = {16'(cy), 8'(slot), 4'b0, rx_idle, tx_busy, par, ti_pending};
  end

  fi_buffers #(.L(L)) u_buf (
    .clk       (clk),
    .par       (par),
    .p_sb_we   (io_sel && io_we && in_sb),
    .p_word    (WW'(io_addr >> 2)),
    .p_wdata   (io_wdata),
    .p_sb_rdata(p_sb_rdata),
    .p_rb_rdata(p_rb_rdata),
    .tx_addr   (sb_addr),
    .tx_rdata  (sb_rdata),
    .rx_we     (rb_we),
    .rx_addr   (rb_addr),
    .rx_wdata  (rb_wdata)
  );

  fi_timer #(.T(T), .NS(NS), .OFF(OFF)) u_timer (
    .clk       (clk),
    .rst_n     (rst_n),
    .master    (sched[0]),
    .sync_in   (tss_det),
    .clr       (clr_ti),
    .cy        (cy),
    .slot      (slot),
    .par       (par),
    .ovf       (ovf),
    .waiting   (waiting),
    .ti        (ti),
    .ti_pending(ti_pending)
  );

  // start of transmission at local cycle OFF of an owned slot
  assign tx_start = sched[slot] && (cy == CW'(OFF)) && !waiting && !tx_busy;

  tx_fsm #(.L(L)) u_tx (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (tx_start),
    .sb_addr (sb_addr),
    .sb_rdata(sb_rdata),
    .s_out   (s_out),
    .busy    (tx_busy),
    .state   (tx_state)
  );

  rx_voter u_vote (
    .clk   (clk),
    .rst_n (rst_n),
    .fbus  (fbus),
    .v     (v),
    .v_fall(v_fall)
  );

  rx_strobe u_strobe (
    .clk   (clk),
    .rst_n (rst_n),
    .sync  (rx_sync),
    .strobe(strobe)
  );

  rx_fsm #(.L(L)) u_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .v        (v),
    .v_fall   (v_fall),
    .strobe   (strobe),
    .sync     (rx_sync),
    .tss_det  (tss_det),
    .rb_we    (rb_we),
    .rb_addr  (rb_addr),
    .rb_wdata (rb_wdata),
    .idle     (rx_idle),
    .frame_ok (frame_ok),
    .frame_err(frame_err),
    .state    (rx_state)
  );

endmodule
