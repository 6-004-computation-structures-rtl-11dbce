// pc_inc4: y = a + 4 (modulo 2^32) without a general 32-bit adder.
//
// Adding the constant 0x00000004 leaves bits [1:0] unchanged and adds one to
// bits [31:2]. Adding one needs only a half adder per bit: bit i flips when
// every lower bit of a[31:2] is 1, so the carry into bit i is the AND of the
// bits below it. This is the reduced increment-by-4 circuit; the two low bits
// are passed through so that odd PC values stay visible in traces. The
// processor description asks only for a circuit smaller than a full adder;
// the half-adder chain is this design's way of getting one.
// Purely combinational.
module pc_inc4 (
  input  logic [31:0] a,
  output logic [31:0] y
);

  logic [31:2] carry;  // carry into each bit of the +1 chain on a[31:2]

  assign carry[2] = 1'b1;
  for (genvar i = 3; i < 32; i++) begin : g_carry
    assign carry[i] = carry[i-1] & a[i-1];
  end

  assign y[1:0]  = a[1:0];
  assign y[31:2] = a[31:2] ^ carry[31:2];

endmodule
