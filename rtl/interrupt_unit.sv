// interrupt_unit: interrupt cause, masking and JISR logic of the processor.
//
// Interrupt causes are numbered 0..31.  External causes (set E_MASK) come in
// as event signals eev, internal ones (the rest) as iev from the processor.
// The cause vector takes each bit from the side it belongs to:
//   ca[j]  = E_MASK[j] ? eev[j] : iev[j]
// Maskable causes (set M_MASK) are gated with the status register:
//   mca[j] = M_MASK[j] ? ca[j] & sr[j] : ca[j]
// Causes are sampled for the instruction in the write-back stage (wb_valid),
// which gives precise interrupts.  If any masked cause is active, jisr is
// raised; at that clock edge sr is cleared (all maskable interrupts masked)
// and mca is saved in the exception cause register eca.  The processor then
// restarts at the interrupt service routine, dpc = 0 and pc = 4.
//
// Interface: combinational ca/mca/jisr; sr and eca registered.  sr_we lets
// software write the status register (to unmask the timer interrupt); an
// interrupt in the same cycle wins.
//
// The cause, mask and JISR equations and the sr/eca updates follow the
// described instruction set.  The cause numbering (0 reset, 1 illegal
// instruction, 2 misalignment, 3 overflow, 4 timer) and the reset values are
// choices of this design.
module interrupt_unit #(
  parameter logic [31:0] E_MASK = 32'h0000_0011,  // reset (0), timer (4)
  parameter logic [31:0] M_MASK = 32'h0000_0018   // overflow (3), timer (4)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] eev,
  input  logic [31:0] iev,
  input  logic        wb_valid,
  input  logic        sr_we,
  input  logic [31:0] sr_wdata,
  output logic [31:0] ca,
  output logic [31:0] mca,
  output logic        jisr,
  output logic [31:0] sr,
  output logic [31:0] eca
);

  always_comb begin
    ca   = (eev & E_MASK) | (iev & ~E_MASK);
    mca  = (ca & ~M_MASK) | (ca & M_MASK & sr);
    jisr = wb_valid && (|mca);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      eca <= '0;
    end else if (jisr) begin
      sr  <= '0;
      eca <= mca;
    end else if (sr_we) begin
      sr  <= sr_wdata;
    end
  end

endmodule
