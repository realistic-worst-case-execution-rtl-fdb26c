// tb_io_decode: self-checking test of the load/store address decode.
// Random base registers and immediates, plus addresses aimed at the edges of
// the device window, are checked against ea = rs1 + sign-extended imm, the
// memory range ea < D and the device range BA <= ea <= BA + K - 4.
`timescale 1ns/1ps
module tb_io_decode;
  localparam logic [31:0] D = 32'h8000_0000, BA = 32'h8000_0000;
  localparam int K = 24;
  logic [31:0] rs1_val, ea;
  logic [15:0] imm;
  logic access, mem_sel, dev_sel, misaligned;
  logic [4:0] dev_off;
  int checks = 0, failures = 0, n_dev = 0, n_mem = 0;

  io_decode #(.D(D), .BA(BA), .K(K)) dut (.rs1_val, .imm, .access, .ea, .mem_sel, .dev_sel,
                                          .dev_off, .misaligned);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [31:0] r, logic [15:0] i, logic acc);
    longint e;
    bit exp_dev, exp_mem;
    rs1_val = r; imm = i; access = acc;
    #1;
    e = (longint'(r) + longint'($signed(i))) & 64'hFFFF_FFFF;
    exp_mem = acc && (e < longint'(D));
    exp_dev = acc && (e >= longint'(BA)) && (e <= longint'(BA) + K - 4);
    checks++;
    if (ea !== 32'(e) || mem_sel !== exp_mem || dev_sel !== exp_dev ||
        misaligned !== (acc && e[1:0] != 0) || (exp_dev && dev_off !== 5'(e - longint'(BA)))) begin
      failures++;
      $display("FAIL: rs1=%h imm=%h ea=%h dev=%0d mem=%0d off=%0d", r, i, ea, dev_sel, mem_sel, dev_off);
    end
    if (dev_sel) n_dev++;
    if (mem_sel) n_mem++;
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) one($urandom, 16'($urandom), 1'($urandom));
    for (int x = -8; x <= K + 4; x += 4) begin
      one(BA, 16'(x), 1);
      one(BA + 32'h100, 16'(x - 32'h100), 1);
    end
    one(BA - 4, 16'h0, 1);
    one(BA, 16'h0, 0);
    checks++;
    if (n_dev < 6 || n_mem < 100) begin failures++; $display("FAIL: coverage dev=%0d mem=%0d", n_dev, n_mem); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
