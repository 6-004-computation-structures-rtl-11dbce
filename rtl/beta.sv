// beta: single-cycle Beta processor for basic blocks (no branches or jumps).
//
// Every clock cycle executes one instruction. The PC (pc) drives ia; the
// instruction word id comes back from memory in the same cycle. Its fields
// feed the register file (Ra <20:16> to read port A, Rb <15:11> or Rc
// <25:21> to read port B through RA2SEL, Rc as write address) and the opcode
// <31:26> feeds the control ROM (ctl). The ALU takes A from read port A and
// B from the BSEL mux: read port B (bsel = 0) or the 16-bit literal
// sign-extended by copying id[15] into the upper sixteen bits (bsel = 1).
// The ALU output is the data memory address ma; read port B is the memory
// write data mwd. The WDSEL mux picks what is written to Rc: the ALU output
// (wdsel = 0) or the memory read data mrd (wdsel = 1). The register write and
// any memory write take effect at the rising edge that ends the cycle.
//
// Memory interface: ia/id instruction port; ma, moe, mrd, wr, mwd data port.
// wr is forced to 0 while reset is 1. Unimplemented opcodes write nothing.
// The datapath, mux input numbering and reset gating follow the Beta
// design; register writes are not blocked during reset (only memory
// writes need to be), and the ALU encoding is this design's own.
module beta
  import beta_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] ia,
  input  logic [31:0] id,
  output logic [31:0] ma,
  output logic        moe,
  input  logic [31:0] mrd,
  output logic        wr,
  output logic [31:0] mwd
);

  logic        ra2sel, bsel, wdsel, werf;
  alufn_t      alufn;
  logic [31:0] radata, rbdata;
  logic [31:0] sext_c;
  logic [31:0] alu_b;
  logic [31:0] wdata;

  pc u_pc (
    .clk  (clk),
    .reset(reset),
    .ia   (ia)
  );

  ctl u_ctl (
    .reset (reset),
    .op    (id[31:26]),
    .ra2sel(ra2sel),
    .bsel  (bsel),
    .alufn (alufn),
    .wdsel (wdsel),
    .werf  (werf),
    .moe   (moe),
    .wr    (wr)
  );

  regfile u_regfile (
    .clk   (clk),
    .werf  (werf),
    .ra2sel(ra2sel),
    .ra    (id[20:16]),
    .rb    (id[15:11]),
    .rc    (id[25:21]),
    .wdata (wdata),
    .radata(radata),
    .rbdata(rbdata)
  );

  // BSEL mux with sign extension of the literal.
  assign sext_c = {{16{id[15]}}, id[15:0]};
  assign alu_b  = bsel ? sext_c : rbdata;

  alu u_alu (
    .alufn(alufn),
    .a    (radata),
    .b    (alu_b),
    .y    (ma)
  );

  assign mwd = rbdata;

  // WDSEL mux.
  assign wdata = wdsel ? mrd : ma;

  // The memory must never see a write request while reset is applied.
  a_no_write_in_reset: assert property (@(posedge clk) reset |-> !wr);

endmodule
