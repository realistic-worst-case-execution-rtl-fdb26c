// fi_buffers: double send and receive buffers of the f-interface.
//
// Each buffer holds one message of L bytes and exists twice, index 0 and 1.
// The slot parity par (bit 0 of the slot counter) decides who uses which
// copy: the serial interface reads the send buffer sb[par] and writes the
// receive buffer rb[par], while the processor writes sb[!par] and reads
// rb[!par] (and may read back sb[!par]).  So in slot s the bus transmits what
// the processor wrote during slot s-1, and the message received in slot s is
// visible to the processor in slot s+1.  This needs an even number of slots
// per round so that the parity alternates across round boundaries.
//
// Interface: processor side is word-wide (L/4 words, little-endian byte order
// inside a word: byte 4w is bits 7:0); p_sb_we writes a word at the clock
// edge; p_sb_rdata and p_rb_rdata are combinational reads.  Bus side is
// byte-wide: tx_rdata is a combinational read of sb[par][tx_addr], rx_we
// writes rb[par][rx_addr] at the clock edge.  The buffers are not reset.
//
// The double buffering and the parity rule follow the described interface;
// the port widths and read timing are choices of this design.
module fi_buffers #(
  parameter int unsigned L   = 8,
  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned NW = L / 4,
  localparam int unsigned WW = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic          clk,
  input  logic          par,
  // processor side, buffer !par
  input  logic          p_sb_we,
  input  logic [WW-1:0] p_word,
  input  logic [31:0]   p_wdata,
  output logic [31:0]   p_sb_rdata,
  output logic [31:0]   p_rb_rdata,
  // bus side, buffer par
  input  logic [AW-1:0] tx_addr,
  output logic [7:0]    tx_rdata,
  input  logic          rx_we,
  input  logic [AW-1:0] rx_addr,
  input  logic [7:0]    rx_wdata
);

  logic [7:0] sb [2][L];
  logic [7:0] rb [2][L];

  initial begin
    if (L % 4 != 0) $error("fi_buffers: L must be a multiple of 4");
  end

  always_ff @(posedge clk) begin
    if (p_sb_we)
      for (int b = 0; b < 4; b++)
        sb[!par][4 * int'(p_word) + b] <= p_wdata[8 * b +: 8];
    if (rx_we)
      rb[par][rx_addr] <= rx_wdata;
  end

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      p_sb_rdata[8 * b +: 8] = sb[!par][4 * int'(p_word) + b];
      p_rb_rdata[8 * b +: 8] = rb[!par][4 * int'(p_word) + b];
    end
  end

  assign tx_rdata = sb[par][tx_addr];

endmodule
