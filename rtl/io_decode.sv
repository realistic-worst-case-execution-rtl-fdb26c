// io_decode: effective address and memory-map decode for loads and stores.
//
// The effective address of lw/sw is ea = gpr(RS1) + sxt(imm), modulo 2^32,
// with the 16-bit immediate sign extended.  Addresses below D belong to the
// processor's memory; the f-interface occupies the K bytes of I/O ports from
// its base address BA, and a word access hits it when BA <= ea <= BA + K - 4.
// dev_off = ea - BA is the byte offset inside the device.  Accesses must be
// word aligned; misaligned flags one that is not.
//
// Interface: purely combinational.  access is high for a load or a store.
//
// The address arithmetic and the decode rule follow the described memory
// map; the values of D and BA are choices of this design.
module io_decode #(
  parameter logic [31:0] D  = 32'h8000_0000,
  parameter logic [31:0] BA = 32'h8000_0000,
  parameter int unsigned K  = 24,
  localparam int unsigned KW = $clog2(K)
) (
  input  logic [31:0]   rs1_val,
  input  logic [15:0]   imm,
  input  logic          access,
  output logic [31:0]   ea,
  output logic          mem_sel,
  output logic          dev_sel,
  output logic [KW-1:0] dev_off,
  output logic          misaligned
);

  logic [31:0] rel;

  always_comb begin
    ea         = rs1_val + {{16{imm[15]}}, imm};
    rel        = ea - BA;
    misaligned = access && (ea[1:0] != 2'b00);
    mem_sel    = access && (ea < D);
    dev_sel    = access && (ea >= BA) && (rel <= 32'(K - 4));
    dev_off    = rel[KW-1:0];
  end

endmodule
