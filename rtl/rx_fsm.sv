// rx_fsm: frame automaton of the serial receiver.
//
// The automaton follows the frame f(m) = TSS FSS (BS1 BS0 m[i])* FES TES,
// i.e. 0 1 (1 0 byte)* 0 1, one frame bit per strobe.  Its state is the frame
// bit sampled at the last strobe.  In the idle state a falling edge of the
// voted bit is the start of a transmission; inside a frame the falling edge
// between BS1 and BS0 is expected.  Either one raises
//   sync = (idle | BS1) & v_fall,
// which restarts the bit-phase counter.  Message bits are shifted in most
// significant bit first; after the eighth bit the byte is written to the
// bus-side receive buffer at index byte_idx.  After FES and TES are seen the
// automaton returns to idle and pulses frame_ok.  A frame bit that does not
// have its protocol value (TSS, FSS, BS1, BS0, FES, TES) sends the automaton
// back to idle and pulses frame_err.
//
// Interface: v, v_fall from rx_voter, strobe from rx_strobe, all in the local
// clock domain.  rb_we/rb_addr/rb_wdata write one byte in the cycle of the
// strobe that samples the last bit of a byte.  tss_det pulses at the falling
// edge that starts a frame and is used by the slot timer.
//
// The states, the sync equation and the strobe-clocked sampling follow the
// described receiver.  The bit order within a byte, the error exits and the
// frame_ok/frame_err outputs are choices of this design.
module rx_fsm
  import fr_pkg::*;
#(
  parameter int unsigned L  = 8,
  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          v,
  input  logic          v_fall,
  input  logic          strobe,
  output logic          sync,
  output logic          tss_det,
  output logic          rb_we,
  output logic [AW-1:0] rb_addr,
  output logic [7:0]    rb_wdata,
  output logic          idle,
  output logic          frame_ok,
  output logic          frame_err,
  output frame_bit_e    state
);

  logic [AW-1:0] byte_idx;
  logic [3:0]    bit_cnt;   // message bits of the current byte sampled so far
  logic [6:0]    shreg;     // first seven bits of the byte
  logic          last_byte;

  assign idle      = (state == FB_IDLE);
  assign sync      = (idle || state == FB_BS1) && v_fall;
  assign tss_det   = idle && v_fall;
  assign last_byte = (byte_idx == AW'(L - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= FB_IDLE;
      byte_idx  <= '0;
      bit_cnt   <= '0;
      shreg     <= '0;
      rb_we     <= 1'b0;
      rb_addr   <= '0;
      rb_wdata  <= '0;
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      rb_we     <= 1'b0;
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
      if (strobe) begin
        unique case (state)
          FB_IDLE: if (!v) begin
            state    <= FB_TSS;
            byte_idx <= '0;
          end
          FB_TSS: if (v) state <= FB_FSS;
                  else begin state <= FB_IDLE; frame_err <= 1'b1; end
          FB_FSS: if (v) state <= FB_BS1;
                  else begin state <= FB_IDLE; frame_err <= 1'b1; end
          FB_BS1: if (!v) state <= FB_BS0;
                  else begin state <= FB_IDLE; frame_err <= 1'b1; end
          FB_BS0: begin
            state   <= FB_DATA;
            shreg   <= {6'b0, v};
            bit_cnt <= 4'd1;
          end
          FB_DATA: begin
            if (bit_cnt < 4'd8) begin
              shreg   <= {shreg[5:0], v};
              bit_cnt <= bit_cnt + 4'd1;
              if (bit_cnt == 4'd7) begin
                rb_we    <= 1'b1;
                rb_addr  <= byte_idx;
                rb_wdata <= {shreg, v};
              end
            end else if (last_byte) begin
              // the bit after the last byte is FES (0)
              if (!v) state <= FB_FES;
              else begin state <= FB_IDLE; frame_err <= 1'b1; end
            end else begin
              // the bit after any other byte is BS1 (1)
              if (v) begin
                state    <= FB_BS1;
                byte_idx <= byte_idx + AW'(1);
              end else begin
                state     <= FB_IDLE;
                frame_err <= 1'b1;
              end
            end
          end
          FB_FES: begin
            state <= FB_IDLE;
            if (v) frame_ok  <= 1'b1;   // TES
            else   frame_err <= 1'b1;
          end
          default: state <= FB_IDLE;
        endcase
      end
    end
  end

  // received bytes stay inside the buffer
  a_rb_addr: assert property (@(posedge clk) disable iff (!rst_n) rb_we |-> int'(rb_addr) < L);

endmodule
