// tb_interrupt_unit: self-checking test of the interrupt cause logic.
// Random external and internal events, status register values and write-back
// valid bits are applied; ca, mca and jisr are compared with the cause and
// mask equations computed here, and sr/eca with their expected updates
// (cleared sr and saved mca on an interrupt, software write otherwise).
`timescale 1ns/1ps
module tb_interrupt_unit;
  localparam logic [31:0] E = 32'h0000_0011, M = 32'h0000_0018;
  logic clk = 0, rst_n = 0, wb_valid = 0, sr_we = 0;
  logic [31:0] eev = 0, iev = 0, sr_wdata = 0, ca, mca, sr, eca;
  logic jisr;
  logic [31:0] m_sr, m_eca, exp_ca, exp_mca;
  int checks = 0, failures = 0, n_jisr = 0, n_masked = 0;

  interrupt_unit #(.E_MASK(E), .M_MASK(M)) dut (.clk, .rst_n, .eev, .iev, .wb_valid, .sr_we,
    .sr_wdata, .ca, .mca, .jisr, .sr, .eca);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_sr = 0; m_eca = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // sparse events so that both interrupt and no-interrupt cycles occur
      eev = $urandom & $urandom & $urandom;
      iev = $urandom & $urandom & $urandom & $urandom & {27'b0, 5'h1F};
      if ($urandom_range(0, 3) == 0) eev[4] = 1;   // timer
      wb_valid = $urandom_range(0, 1);
      sr_we = ($urandom_range(0, 4) == 0);
      sr_wdata = $urandom;
      #1;
      for (int j = 0; j < 32; j++) begin
        exp_ca[j]  = E[j] ? eev[j] : iev[j];
        exp_mca[j] = M[j] ? (exp_ca[j] && m_sr[j]) : exp_ca[j];
      end
      checks++;
      if (ca !== exp_ca || mca !== exp_mca || jisr !== (wb_valid && exp_mca != 0)) begin
        failures++;
        $display("FAIL at %0d: ca=%h/%h mca=%h/%h jisr=%0d", i, ca, exp_ca, mca, exp_mca, jisr);
      end
      if (exp_ca[4] && !exp_mca[4]) n_masked++;
      if (jisr) n_jisr++;
      @(posedge clk);
      if (wb_valid && exp_mca != 0) begin m_sr = 0; m_eca = exp_mca; end
      else if (sr_we) m_sr = sr_wdata;
      #1;
      checks++;
      if (sr !== m_sr || eca !== m_eca) begin
        failures++;
        $display("FAIL at %0d: sr=%h/%h eca=%h/%h", i, sr, m_sr, eca, m_eca);
      end
    end
    checks++;
    if (n_jisr == 0 || n_masked == 0) begin failures++; $display("FAIL: no interrupt or no masked timer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
