// ctl: Beta control logic for basic blocks.
//
// A 64-entry, 12-bit control ROM is addressed by the opcode field id[31:26].
// Each entry holds ra2sel, bsel, alufn[5:0], wdsel, werf, moe and xwr (see
// ctl_word_t in beta_pkg). The contents are computed at elaboration by
// rom_entry(), one entry per opcode:
//   LD            bsel = 1, ALUFN = ADD, wdsel = 1, werf = 1, moe = 1
//   ST            ra2sel = 1, bsel = 1, ALUFN = ADD, xwr = 1
//   OP(Ra,Rb,Rc)  werf = 1, ALUFN of the operation
//   OPC(Ra,lit,Rc) as OP with bsel = 1
//   other opcodes all zero: werf = 0 and xwr = 0, so the instruction is a NOP
//
// The memory write enable must be valid even before the first instruction
// is fetched, so wr = xwr & ~reset: while reset is 1 memory is never
// written, whatever the (possibly undefined) instruction word says. The
// other outputs come straight from the ROM. Purely combinational. The ROM
// shape (64 x 12, opcode-addressed) and the reset gating follow the Beta
// design; the bit values depend on this design's ALUFN encoding.
module ctl
  import beta_pkg::*;
(
  input  logic       reset,
  input  logic [5:0] op,       // id[31:26]
  output logic       ra2sel,
  output logic       bsel,
  output alufn_t     alufn,
  output logic       wdsel,
  output logic       werf,
  output logic       moe,
  output logic       wr
);

  function automatic ctl_word_t rom_entry(input logic [5:0] opc);
    ctl_word_t w;
    w = '0;
    unique case (opc)
      OP_LD:  begin w.bsel = 1'b1; w.alufn = ALUFN_ADD; w.wdsel = 1'b1;
                    w.werf = 1'b1; w.moe = 1'b1; end
      OP_ST:  begin w.ra2sel = 1'b1; w.bsel = 1'b1; w.alufn = ALUFN_ADD;
                    w.xwr = 1'b1; end
      OP_ADD,   OP_ADDC:   begin w.werf = 1'b1; w.alufn = ALUFN_ADD;   end
      OP_SUB,   OP_SUBC:   begin w.werf = 1'b1; w.alufn = ALUFN_SUB;   end
      OP_CMPEQ, OP_CMPEQC: begin w.werf = 1'b1; w.alufn = ALUFN_CMPEQ; end
      OP_CMPLT, OP_CMPLTC: begin w.werf = 1'b1; w.alufn = ALUFN_CMPLT; end
      OP_CMPLE, OP_CMPLEC: begin w.werf = 1'b1; w.alufn = ALUFN_CMPLE; end
      OP_AND,   OP_ANDC:   begin w.werf = 1'b1; w.alufn = ALUFN_AND;   end
      OP_OR,    OP_ORC:    begin w.werf = 1'b1; w.alufn = ALUFN_OR;    end
      OP_XOR,   OP_XORC:   begin w.werf = 1'b1; w.alufn = ALUFN_XOR;   end
      OP_SHL,   OP_SHLC:   begin w.werf = 1'b1; w.alufn = ALUFN_SHL;   end
      OP_SHR,   OP_SHRC:   begin w.werf = 1'b1; w.alufn = ALUFN_SHR;   end
      OP_SRA,   OP_SRAC:   begin w.werf = 1'b1; w.alufn = ALUFN_SRA;   end
      default: ;
    endcase
    // The literal forms of the operate instructions (opcodes 11xxxx)
    // take their B operand from the sign-extended constant.
    if (opc[5:4] == 2'b11 && w.werf) w.bsel = 1'b1;
    return w;
  endfunction

  function automatic logic [CTL_NLOC*CTL_WIDTH-1:0] build_rom();
    logic [CTL_NLOC*CTL_WIDTH-1:0] r;
    for (int k = 0; k < CTL_NLOC; k++) r[k*CTL_WIDTH +: CTL_WIDTH] = rom_entry(6'(k));
    return r;
  endfunction

  localparam logic [CTL_NLOC*CTL_WIDTH-1:0] ROM = build_rom();

  ctl_word_t word;

  assign word   = ctl_word_t'(ROM[32'(op)*CTL_WIDTH +: CTL_WIDTH]);
  assign ra2sel = word.ra2sel;
  assign bsel   = word.bsel;
  assign alufn  = word.alufn;
  assign wdsel  = word.wdsel;
  assign werf   = word.werf;
  assign moe    = word.moe;
  assign wr     = word.xwr & ~reset;

endmodule
