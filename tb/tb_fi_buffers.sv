// tb_fi_buffers: self-checking test of the double send/receive buffers.
// For both parities: the processor writes random words into sb[!par], the
// parity flips and the bus side must read the same bytes (little-endian) from
// sb[par]; the bus side writes random bytes into rb[par], the parity flips and
// the processor must read them as words from rb[!par].  Also checks that a
// processor write does not disturb the buffer the bus is using.
`timescale 1ns/1ps
module tb_fi_buffers;
  localparam int L = 8;
  logic clk = 0, par = 0, p_sb_we = 0, rx_we = 0;
  logic [0:0] p_word;
  logic [31:0] p_wdata, p_sb_rdata, p_rb_rdata;
  logic [2:0] tx_addr, rx_addr;
  logic [7:0] tx_rdata, rx_wdata;
  logic [7:0] ref_sb [L], ref_rb [L];
  int checks = 0, failures = 0;

  fi_buffers #(.L(L)) dut (.clk, .par, .p_sb_we, .p_word, .p_wdata, .p_sb_rdata, .p_rb_rdata,
                           .tx_addr, .tx_rdata, .rx_we, .rx_addr, .rx_wdata);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s = %h expected %h (par=%0d)", what, got, exp, par);
    end
  endtask

  initial begin
    p_word = '0; p_wdata = '0; tx_addr = '0; rx_addr = '0; rx_wdata = '0;
    for (int round = 0; round < 8; round++) begin
      // processor fills the send buffer it sees
      @(negedge clk);
      for (int w = 0; w < L / 4; w++) begin
        p_word = 1'(w); p_wdata = $urandom; p_sb_we = 1;
        for (int b = 0; b < 4; b++) ref_sb[4 * w + b] = p_wdata[8 * b +: 8];
        @(negedge clk);
      end
      p_sb_we = 0;
      for (int w = 0; w < L / 4; w++) begin
        p_word = 1'(w); #1;
        chk("processor read-back", p_sb_rdata,
            {ref_sb[4 * w + 3], ref_sb[4 * w + 2], ref_sb[4 * w + 1], ref_sb[4 * w]});
      end
      // bus fills the receive buffer it sees
      for (int i = 0; i < L; i++) begin
        rx_addr = 3'(i); rx_wdata = 8'($urandom); rx_we = 1; ref_rb[i] = rx_wdata;
        @(negedge clk);
      end
      rx_we = 0;
      // slot boundary: parity flips
      par = !par;
      // processor writes into the other send buffer; must not touch the bus side
      p_word = 0; p_wdata = 32'hDEAD_BEEF; p_sb_we = 1;
      @(negedge clk);
      p_sb_we = 0;
      for (int i = 0; i < L; i++) begin
        tx_addr = 3'(i); #1;
        chk("bus read of send buffer", 32'(tx_rdata), 32'(ref_sb[i]));
      end
      for (int w = 0; w < L / 4; w++) begin
        p_word = 1'(w); #1;
        chk("processor read of receive buffer", p_rb_rdata,
            {ref_rb[4 * w + 3], ref_rb[4 * w + 2], ref_rb[4 * w + 1], ref_rb[4 * w]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
