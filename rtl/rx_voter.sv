// rx_voter: receiver front end of the serial interface.
//
// The bus is driven from another ECU's clock domain, so its value can change
// inside this register's set-up/hold window.  Register r samples the bus every
// cycle; r_hat re-samples r so that a metastable r never reaches the logic.
// A 4-bit shift register keeps the four previous values of r_hat, and the
// voted bit v is the majority of those five samples, which removes glitches
// of up to two cycles.  v_q holds v of the previous cycle, so v_fall marks a
// falling edge of the voted bit (not v and previous v), the event on which the
// bit counter is resynchronised.
//
// Interface: fbus is asynchronous; v and v_fall are combinational from this
// module's registers.  Latency: a clean bus change reaches v four cycles after
// the first edge of clk that samples it (r, r_hat, then two more samples to
// form a majority).
//
// Structure (r, r_hat, 4-bit shift register, 5-input majority) follows the
// described receiver logic.  Reset to the idle bus value 1 is a choice of this
// design.
module rx_voter (
  input  logic clk,
  input  logic rst_n,
  input  logic fbus,
  output logic v,
  output logic v_fall
);

  logic       r, r_hat, v_q;
  logic [3:0] sh;
  logic [2:0] ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r     <= 1'b1;
      r_hat <= 1'b1;
      sh    <= 4'hF;
      v_q   <= 1'b1;
    end else begin
      r     <= fbus;
      r_hat <= r;
      sh    <= {sh[2:0], r_hat};
      v_q   <= v;
    end
  end

  always_comb begin
    ones = 3'(r_hat) + 3'(sh[0]) + 3'(sh[1]) + 3'(sh[2]) + 3'(sh[3]);
    v    = (ones >= 3'd3);
  end

  assign v_fall = v_q & ~v;

endmodule
