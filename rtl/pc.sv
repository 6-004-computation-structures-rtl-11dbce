// pc: the Beta program counter for straight-line code.
//
// A 32-bit register holds the address of the current instruction (ia). The
// value loaded at each rising edge comes from a two-input mux: 0x00000000
// while reset is 1, otherwise the output of the increment-by-4 logic
// (pc_inc4). Reset is therefore synchronous: holding it across the first
// rising edge starts execution at address 0. All 32 bits are stored,
// including the two low bits that are always zero, to keep traces readable.
// ia changes only on the rising edge of clk. The mux, the register and the
// separate +4 circuit are as described for the Beta; the register has no
// reset of its own, so before the first edge ia is undefined.
module pc (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] ia
);

  logic [31:0] ia_plus4;
  logic [31:0] pc_next;

  pc_inc4 u_inc4 (.a(ia), .y(ia_plus4));

  assign pc_next = reset ? 32'h0000_0000 : ia_plus4;

  always_ff @(posedge clk) ia <= pc_next;

endmodule
