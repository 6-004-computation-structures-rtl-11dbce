// alu: the 32-bit Beta ALU.
//
// Combinational. ALUFN selects one of four units (encoding in beta_pkg):
//   arithmetic  y = a + b, or a - b when alufn[0] = 1
//   Boolean     each result bit is alufn[3:0] indexed by {b[i], a[i]}, so
//               AND = 1000, OR = 1110, XOR = 0110
//   shift       a shifted by b[4:0]: SHL (00), SHR (01), SRA (11)
//   compare     y = 1 or 0 for a == b, a < b, a <= b (signed), read from the
//               zero, negative and overflow flags of a - b
// The comparisons reuse the subtractor; the compare codes set alufn[0] so the
// adder subtracts. Only the block's name and its ALUFN input come from the
// processor description; the unit structure and encoding are this design's.
module alu
  import beta_pkg::*;
(
  input  alufn_t      alufn,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [31:0] b_eff;
  logic [31:0] sum;
  logic        z, v, n;
  logic [31:0] boole;
  logic [31:0] shift;
  logic        cmp;

  always_comb begin
    // Adder/subtractor with flags.
    b_eff = alufn[0] ? ~b : b;
    sum   = a + b_eff + 32'(alufn[0]);
    z     = (sum == 32'h0);
    n     = sum[31];
    v     = (a[31] & b_eff[31] & ~sum[31]) | (~a[31] & ~b_eff[31] & sum[31]);

    // Boolean unit: a 4-input truth-table lookup per bit.
    for (int i = 0; i < 32; i++) boole[i] = alufn[{1'b0, b[i], a[i]}];

    // Shifter.
    unique case (alufn[1:0])
      2'b00:   shift = a << b[4:0];
      2'b01:   shift = a >> b[4:0];
      2'b11:   shift = 32'($signed(a) >>> b[4:0]);
      default: shift = a >> b[4:0];
    endcase

    // Comparator.
    unique case (alufn[2:1])
      2'b01:   cmp = z;
      2'b10:   cmp = n ^ v;
      2'b11:   cmp = z | (n ^ v);
      default: cmp = 1'b0;
    endcase

    unique case (alufn[5:4])
      2'b00: y = sum;
      2'b01: y = boole;
      2'b10: y = shift;
      2'b11: y = {31'h0, cmp};
    endcase
  end

endmodule
