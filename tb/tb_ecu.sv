// tb_ecu: self-checking test of one ECU's interface side at its default size.
// A behavioural processor issues lw/sw through the address decode (base
// register BA plus offset), programs the schedule (slot 0 only, so the ECU is
// the synchronisation master and hears its own frame), unmasks the timer
// interrupt in sr and keeps an instruction in write-back.  Checks: the timer
// interrupt raises jisr once unmasked, eca records cause 4, sr is cleared;
// clearing the pending flag through a store works; the message stored in
// slot 3 is loaded back from the receive buffer in slot 1; a store below D
// goes to memory and not to the interface.
`timescale 1ns/1ps
module tb_ecu;
  localparam int L = 8;
  localparam logic [31:0] BA = 32'h8000_0000;
  logic clk = 0, rst_n = 0;
  logic [31:0] rs1_val = 0, st_data = 0, io_rdata, eev_in = 0, iev = 0, sr_wdata = 0, sr, eca;
  logic [15:0] imm = 0;
  logic lw = 0, sw = 0, mem_sel, dev_sel, misaligned, wb_valid = 0, sr_we = 0, jisr;
  logic fbus, s_out, ti_pending, tx_busy, frame_ok, frame_err;
  logic [1:0] slot;
  logic [9:0] cy;
  logic [31:0] msg [L / 4];
  int checks = 0, failures = 0, n_jisr = 0;

  ecu dut (.clk, .rst_n, .rs1_val, .imm, .lw, .sw, .st_data, .io_rdata, .mem_sel, .dev_sel,
           .misaligned, .eev_in, .iev, .wb_valid, .sr_we, .sr_wdata, .jisr, .sr, .eca, .fbus,
           .s_out, .slot, .cy, .ti_pending, .tx_busy, .frame_ok, .frame_err);

  assign fbus = s_out;
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && jisr) n_jisr++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL at %0t: %s = %0h expected %0h", $time, what, got, exp);
    end
  endtask

  task automatic store(logic [31:0] base, int off, logic [31:0] data);
    @(negedge clk);
    rs1_val = base; imm = 16'(off); st_data = data; sw = 1;
    @(negedge clk);
    sw = 0;
  endtask

  task automatic load(logic [31:0] base, int off, output logic [31:0] data);
    @(negedge clk);
    rs1_val = base; imm = 16'(off); lw = 1;
    #1 data = io_rdata;
    chk("load hits device", dev_sel, 1);
    @(negedge clk);
    lw = 0;
  endtask

  task automatic wait_slot(int s);
    logic [31:0] d;
    do begin
      wait (ti_pending);
      store(BA, 2 * L + 4, 1);
      load(BA, 2 * L + 4, d);
    end while (d[15:8] != 8'(s));
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // store below D goes to memory
    @(negedge clk);
    rs1_val = 32'h0000_1000; imm = 16'hFFFC; sw = 1;
    #1 chk("memory store selects memory", mem_sel, 1);
    chk("memory store leaves device", dev_sel, 0);
    @(negedge clk) sw = 0;
    store(BA, 2 * L, 32'b0001);
    // timer interrupt masked: no jisr yet
    wait (ti_pending);
    @(negedge clk) wb_valid = 1;
    repeat (3) @(negedge clk);
    chk("masked timer gives no jisr", n_jisr, 0);
    // unmask the timer (cause 4)
    sr_we = 1; sr_wdata = 32'h10;
    @(negedge clk) sr_we = 0;
    @(negedge clk);
    chk("jisr taken", int'(n_jisr > 0), 1);
    chk("eca timer cause", eca[4], 1);
    chk("sr cleared", sr, 0);
    wb_valid = 0;
    store(BA, 2 * L + 4, 1);
    chk("ti cleared", ti_pending, 0);
    // message written in slot 3 is sent in slot 0, seen in slot 1
    wait_slot(3);
    for (int w = 0; w < L / 4; w++) begin msg[w] = $urandom; store(BA, 4 * w, msg[w]); end
    wait_slot(1);
    for (int w = 0; w < L / 4; w++) begin
      load(BA, L + 4 * w, d);
      chk("received word", d, msg[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
