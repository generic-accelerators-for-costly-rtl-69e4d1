// General-purpose register file with share-pair access for masked operands.
//
// NREGS 32-bit registers; x0 reads as zero. A masked value occupies an
// adjacent even/odd pair: share 0 in the even register, share 1 (kept bit-
// reversed) in the odd one. A register address selects its pair through
// bits [4:1], so rs, rs|1 and rs&~1 name the same operand.
// Three combinational pair read ports serve rs1, rs2 and, for cmov, rd as a
// third source. Two synchronous pair write ports: wb_* from the write-back
// stage, and ext_* for the rest of the core (loads); wb_* wins on a clash.
// A fourth read port (ext_raddr) lets the rest of the core read a pair.
// Reads return the value before a same-cycle write (no internal bypass; the
// forwarding unit covers that case). No reset: contents start undefined.
// Pairs in adjacent registers and three read ports follow the extension's
// description; the even/odd rule, the extra ports and the write priority
// are this design's choices.
module masked_regfile
  import mask_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic       clk,
  input  logic [4:0] ra1,
  input  logic [4:0] ra2,
  input  logic [4:0] ra3,
  output mword_t     rd1,
  output mword_t     rd2,
  output mword_t     rd3,
  input  logic       wb_we,
  input  logic [4:0] wb_wa,
  input  mword_t     wb_wd,
  input  logic       ext_we,
  input  logic [4:0] ext_wa,
  input  mword_t     ext_wd,
  input  logic [4:0] ext_raddr,
  output mword_t     ext_rdata
);

  localparam int unsigned AW = $clog2(NREGS);

  logic [XLEN-1:0] regs [NREGS];

  function automatic mword_t read_pair(input logic [4:0] a);
    logic [AW-1:0] e, o;
    e = AW'({a[4:1], 1'b0});
    o = AW'({a[4:1], 1'b1});
    read_pair.s0 = (e == '0) ? '0 : regs[e];
    read_pair.s1 = regs[o];
  endfunction

  always_comb begin
    rd1       = read_pair(ra1);
    rd2       = read_pair(ra2);
    rd3       = read_pair(ra3);
    ext_rdata = read_pair(ext_raddr);
  end

  always_ff @(posedge clk) begin
    if (ext_we && !(wb_we && wb_wa[4:1] == ext_wa[4:1])) begin
      regs[AW'({ext_wa[4:1], 1'b0})] <= ext_wd.s0;
      regs[AW'({ext_wa[4:1], 1'b1})] <= ext_wd.s1;
    end
    if (wb_we) begin
      regs[AW'({wb_wa[4:1], 1'b0})] <= wb_wd.s0;
      regs[AW'({wb_wa[4:1], 1'b1})] <= wb_wd.s1;
    end
  end

endmodule
