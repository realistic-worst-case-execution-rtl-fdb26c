// tx_fsm: sender automaton and sender register S of the serial interface.
//
// On start the automaton transmits the frame of the L-byte message in the
// bus-side send buffer, f(m) = 0 1 (1 0 m[i])* 0 1 (TSS, FSS, per byte BS1
// BS0 and eight message bits, FES, TES).  Each frame bit is held on the bus
// for eight cycles: the clock enable of S is on for one cycle and off for the
// following seven, so the receiver sees at least six correctly sampled copies.
// A modulo-8 counter times the copies; the automaton state names the frame bit
// in S.  While not transmitting S holds the idle value 1, which leaves the
// wired-AND bus to the other ECUs.
//
// Interface: start is accepted only while idle; S becomes 0 (TSS) at the next
// clock edge.  The frame occupies 8*(10*L+4) cycles, after which busy falls.
// sb_addr selects the byte being sent; sb_rdata must return it in the same
// cycle (combinational buffer read).  s_out is the output of register S.
//
// The frame format and the one-in-eight clock enable follow the described
// protocol; most-significant-bit-first order within a byte is a choice of
// this design.
module tx_fsm
  import fr_pkg::*;
#(
  parameter int unsigned L  = 8,
  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] sb_addr,
  input  logic [7:0]    sb_rdata,
  output logic          s_out,
  output logic          busy,
  output frame_bit_e    state
);

  logic [2:0]    copy;      // which of the eight copies is on the bus
  logic [2:0]    bit_idx;   // message bit within the byte, 7 first
  logic [AW-1:0] byte_idx;
  logic          sce;       // clock enable of S
  logic          s_din;
  frame_bit_e    nstate;
  logic [2:0]    nbit_idx;
  logic [AW-1:0] nbyte_idx;

  assign busy    = (state != FB_IDLE);
  assign sb_addr = byte_idx;

  // Next frame bit, taken when the eighth copy of the current one ends.
  always_comb begin
    nstate    = state;
    nbit_idx  = bit_idx;
    nbyte_idx = byte_idx;
    unique case (state)
      FB_IDLE: if (start) begin nstate = FB_TSS; nbyte_idx = '0; end
      FB_TSS:  nstate = FB_FSS;
      FB_FSS:  nstate = FB_BS1;
      FB_BS1:  nstate = FB_BS0;
      FB_BS0:  begin nstate = FB_DATA; nbit_idx = 3'd7; end
      FB_DATA: begin
        if (bit_idx != 3'd0)                  nbit_idx = bit_idx - 3'd1;
        else if (byte_idx == AW'(L - 1))      nstate = FB_FES;
        else begin nstate = FB_BS1; nbyte_idx = byte_idx + AW'(1); end
      end
      FB_FES:  nstate = FB_TES;
      FB_TES:  nstate = FB_IDLE;
      default: nstate = FB_IDLE;
    endcase
  end

  always_comb begin
    unique case (nstate)
      FB_TSS, FB_BS0, FB_FES: s_din = 1'b0;
      FB_DATA:                s_din = sb_rdata[nbit_idx];
      default:                s_din = 1'b1;
    endcase
  end

  // S is updated when idle and started, or at the last copy of a bit.
  assign sce = (state == FB_IDLE) ? start : (copy == 3'(BIT_COPIES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= FB_IDLE;
      copy     <= '0;
      bit_idx  <= '0;
      byte_idx <= '0;
      s_out    <= 1'b1;
    end else begin
      if (busy) copy <= copy + 3'd1;
      else      copy <= '0;
      if (sce) begin
        state    <= nstate;
        bit_idx  <= nbit_idx;
        byte_idx <= nbyte_idx;
        s_out    <= s_din;
      end
    end
  end

  // handshake rule: a frame is only started while the sender is idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  // the bus is released (S = 1) whenever no frame is in progress
  a_idle_bus: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> s_out);

endmodule
