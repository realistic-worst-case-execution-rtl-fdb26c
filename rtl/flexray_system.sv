// flexray_system: P electronic control units on one FlexRay-like bus.
//
// Each ECU runs on its own oscillator (clk[v], reset rst_n[v]); the clocks
// may differ by up to 0.15 % from the nominal period.  The bus is an open
// collector line: its value is the AND of all sender registers S, and an ECU
// that does not transmit drives the idle value 1.  Every ECU samples the bus
// asynchronously through its own receiver.  The schedule is static: in slot s
// the ECU whose schedule register has bit s set transmits its send buffer,
// and every ECU (the sender included) receives it.  The owner of slot 0
// synchronises all other slot timers once per round.
//
// Ports: per ECU, the load/store and interrupt signals of its processor (the
// processor itself is outside this design) and a few observation signals;
// fbus is the bus value.  Parameters are those of the ECUs: message length L
// bytes, NS slots per round, T cycles per slot.
//
// The system structure follows the described distributed system; P = 4 and
// the default sizes are choices of this design.
module flexray_system #(
  parameter int unsigned P  = 4,
  parameter int unsigned L  = 8,
  parameter int unsigned NS = 4,
  parameter int unsigned T  = 800,
  localparam int unsigned CW = $clog2(T),
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic [P-1:0]          clk,
  input  logic [P-1:0]          rst_n,
  input  logic [P-1:0][31:0]    rs1_val,
  input  logic [P-1:0][15:0]    imm,
  input  logic [P-1:0]          lw,
  input  logic [P-1:0]          sw,
  input  logic [P-1:0][31:0]    st_data,
  output logic [P-1:0][31:0]    io_rdata,
  output logic [P-1:0]          mem_sel,
  output logic [P-1:0]          dev_sel,
  output logic [P-1:0]          misaligned,
  input  logic [P-1:0][31:0]    eev_in,
  input  logic [P-1:0][31:0]    iev,
  input  logic [P-1:0]          wb_valid,
  input  logic [P-1:0]          sr_we,
  input  logic [P-1:0][31:0]    sr_wdata,
  output logic [P-1:0]          jisr,
  output logic [P-1:0][31:0]    sr,
  output logic [P-1:0][31:0]    eca,
  output logic [P-1:0][SW-1:0]  slot,
  output logic [P-1:0][CW-1:0]  cy,
  output logic [P-1:0]          ti_pending,
  output logic [P-1:0]          tx_busy,
  output logic [P-1:0]          frame_ok,
  output logic [P-1:0]          frame_err,
  output logic                  fbus
);

  logic [P-1:0] s_out;

  // open-collector bus: any sender driving 0 pulls the line low
  assign fbus = &s_out;

  for (genvar v = 0; v < P; v++) begin : g_ecu
    ecu #(.L(L), .NS(NS), .T(T)) u_ecu (
      .clk       (clk[v]),
      .rst_n     (rst_n[v]),
      .rs1_val   (rs1_val[v]),
      .imm       (imm[v]),
      .lw        (lw[v]),
      .sw        (sw[v]),
      .st_data   (st_data[v]),
      .io_rdata  (io_rdata[v]),
      .mem_sel   (mem_sel[v]),
      .dev_sel   (dev_sel[v]),
      .misaligned(misaligned[v]),
      .eev_in    (eev_in[v]),
      .iev       (iev[v]),
      .wb_valid  (wb_valid[v]),
      .sr_we     (sr_we[v]),
      .sr_wdata  (sr_wdata[v]),
      .jisr      (jisr[v]),
      .sr        (sr[v]),
      .eca       (eca[v]),
      .fbus      (fbus),
      .s_out     (s_out[v]),
      .slot      (slot[v]),
      .cy        (cy[v]),
      .ti_pending(ti_pending[v]),
      .tx_busy   (tx_busy[v]),
      .frame_ok  (frame_ok[v]),
      .frame_err (frame_err[v])
    );
  end

endmodule
