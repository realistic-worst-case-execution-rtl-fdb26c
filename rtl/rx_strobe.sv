// rx_strobe: bit-phase counter of the serial receiver.
//
// Every frame bit arrives as eight copies.  A modulo-8 counter tracks which
// copy is on the bus; strobe is high when the count is STROBE_AT (4), i.e.
// near the middle of the eight copies, and the voted bit is sampled there.
// sync restarts the counter at 0: it comes at the start of a transmission and
// at the falling edge inside each byte start sequence, so the sampling point
// can drift by at most about one cycle between two restarts.
//
// Interface: sync is sampled at the clock edge; strobe is combinational from
// the counter and suppressed in a cycle with sync, so the first strobe after
// a sync comes STROBE_AT cycles later.
//
// The counter, its restart and the strobe at count 4 follow the described
// receiver; suppressing strobe during sync is a choice of this design.
module rx_strobe #(
  parameter int unsigned STROBE_AT = fr_pkg::STROBE_AT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sync,
  output logic strobe
);

  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= 3'd0;
    else if (sync) cnt <= 3'd0;
    else           cnt <= cnt + 3'd1;
  end

  assign strobe = (cnt == 3'(STROBE_AT)) && !sync;

endmodule
