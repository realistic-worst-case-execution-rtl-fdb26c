// ecu: interface side of one electronic control unit.
//
// An ECU is a processor together with an f-interface.  This module holds the
// parts of the ECU that connect the two: the load/store address decode, the
// f-interface itself and the interrupt logic that turns its timer interrupt
// into an external interrupt cause.  The processor pipeline and its caches
// are outside; their signals are ports of this module.  A load or store whose
// effective address falls into the interface's I/O ports is routed to the
// f-interface (io_rdata returns the loaded word in the same cycle); one below
// D is flagged for the memory system (mem_sel).  The pending timer interrupt
// of the f-interface drives external cause TI_IDX; the other external causes
// come from eev_in.
//
// Timing: all paths from the processor ports are combinational into the
// f-interface's registers; see f_interface for the bus side and the slot
// timing.
//
// The structure (processor + f-interface, memory-mapped buffers, timer
// interrupt as external cause) follows the described ECU; the cause index of
// the timer is a choice of this design.
module ecu #(
  parameter int unsigned L      = 8,
  parameter int unsigned NS     = 4,
  parameter int unsigned T      = 800,
  parameter logic [31:0] D      = 32'h8000_0000,
  parameter logic [31:0] BA     = 32'h8000_0000,
  parameter int unsigned TI_IDX = 4,
  localparam int unsigned CW    = $clog2(T),
  localparam int unsigned SW    = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // load/store of the processor
  input  logic [31:0]   rs1_val,
  input  logic [15:0]   imm,
  input  logic          lw,
  input  logic          sw,
  input  logic [31:0]   st_data,
  output logic [31:0]   io_rdata,
  output logic          mem_sel,
  output logic          dev_sel,
  output logic          misaligned,
  // interrupts
  input  logic [31:0]   eev_in,
  input  logic [31:0]   iev,
  input  logic          wb_valid,
  input  logic          sr_we,
  input  logic [31:0]   sr_wdata,
  output logic          jisr,
  output logic [31:0]   sr,
  output logic [31:0]   eca,
  // bus
  input  logic          fbus,
  output logic          s_out,
  // observation
  output logic [SW-1:0] slot,
  output logic [CW-1:0] cy,
  output logic          ti_pending,
  output logic          tx_busy,
  output logic          frame_ok,
  output logic          frame_err
);

  localparam int unsigned K  = 2 * L + 8;
  localparam int unsigned KW = $clog2(K);

  logic [KW-1:0] dev_off;
  logic [31:0]   eev;
  // outputs of the sub-blocks kept for debug visibility
  logic [31:0]   ea, ca, mca;
  logic          par, rx_idle, waiting, rx_sync;

  io_decode #(.D(D), .BA(BA), .K(K)) u_dec (
    .rs1_val   (rs1_val),
    .imm       (imm),
    .access    (lw || sw),
    .ea        (ea),
    .mem_sel   (mem_sel),
    .dev_sel   (dev_sel),
    .dev_off   (dev_off),
    .misaligned(misaligned)
  );

  f_interface #(.L(L), .NS(NS), .T(T)) u_fi (
    .clk       (clk),
    .rst_n     (rst_n),
    .io_sel    (dev_sel && !misaligned),
    .io_we     (sw),
    .io_addr   (dev_off),
    .io_wdata  (st_data),
    .io_rdata  (io_rdata),
    .ti_pending(ti_pending),
    .fbus      (fbus),
    .s_out     (s_out),
    .slot      (slot),
    .cy        (cy),
    .par       (par),
    .tx_busy   (tx_busy),
    .rx_idle   (rx_idle),
    .frame_ok  (frame_ok),
    .frame_err (frame_err),
    .waiting   (waiting),
    .rx_sync   (rx_sync)
  );

  always_comb begin
    eev         = eev_in;
    eev[TI_IDX] = ti_pending;
  end

  interrupt_unit u_irq (
    .clk     (clk),
    .rst_n   (rst_n),
    .eev     (eev),
    .iev     (iev),
    .wb_valid(wb_valid),
    .sr_we   (sr_we),
    .sr_wdata(sr_wdata),
    .ca      (ca),
    .mca     (mca),
    .jisr    (jisr),
    .sr      (sr),
    .eca     (eca)
  );

endmodule
