// beta_ref_pkg: instruction-level reference for the Beta test benches.
//
// Instruction encoders and an independent model of what each implemented
// instruction computes. Opcodes are written here as plain numbers so that
// the reference does not share constants with the design.
package beta_ref_pkg;

  // Opcodes of the 24 instructions a basic-block Beta executes.
  localparam logic [5:0] IMPL_OPS [24] = '{
    6'h18, 6'h19,                                         // LD, ST
    6'h20, 6'h21, 6'h24, 6'h25, 6'h26,                    // ADD SUB CMPEQ CMPLT CMPLE
    6'h28, 6'h29, 6'h2A, 6'h2C, 6'h2D, 6'h2E,             // AND OR XOR SHL SHR SRA
    6'h30, 6'h31, 6'h34, 6'h35, 6'h36,                    // literal forms
    6'h38, 6'h39, 6'h3A, 6'h3C, 6'h3D, 6'h3E
  };

  localparam logic [5:0] OPC_LD = 6'h18;
  localparam logic [5:0] OPC_ST = 6'h19;

  function automatic bit is_impl(input logic [5:0] op);
    foreach (IMPL_OPS[k]) if (IMPL_OPS[k] == op) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit is_alu_op(input logic [5:0] op);
    return is_impl(op) && op != OPC_LD && op != OPC_ST;
  endfunction

  function automatic bit uses_literal(input logic [5:0] op);
    return op == OPC_LD || op == OPC_ST || op[5:4] == 2'b11;
  endfunction

  function automatic logic [31:0] enc_r(input logic [5:0] op, input int rc,
                                        input int ra, input int rb);
    return {op, 5'(rc), 5'(ra), 5'(rb), 11'h0};
  endfunction

  function automatic logic [31:0] enc_c(input logic [5:0] op, input int rc,
                                        input int ra, input logic [15:0] lit);
    return {op, 5'(rc), 5'(ra), lit};
  endfunction

  function automatic logic [31:0] sext16(input logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  // What the instruction computes from its two operands (for LD and ST:
  // the effective address). Register and literal forms share the low four
  // opcode bits.
  function automatic logic [31:0] compute(input logic [5:0] op,
                                          input logic [31:0] a,
                                          input logic [31:0] b);
    if (op == OPC_LD || op == OPC_ST) return a + b;
    case (op[3:0])
      4'h0: return a + b;
      4'h1: return a - b;
      4'h4: return (a == b) ? 32'd1 : 32'd0;
      4'h5: return ($signed(a) <  $signed(b)) ? 32'd1 : 32'd0;
      4'h6: return ($signed(a) <= $signed(b)) ? 32'd1 : 32'd0;
      4'h8: return a & b;
      4'h9: return a | b;
      4'hA: return a ^ b;
      4'hC: return a << b[4:0];
      4'hD: return a >> b[4:0];
      4'hE: return 32'($signed(a) >>> b[4:0]);
      default: return 32'h0;
    endcase
  endfunction

endpackage
