// tb_alu: drives every ALU function with corner and random operands and
// compares the result with the reference computation of the instruction
// that uses that function.
module tb_alu;
  import beta_ref_pkg::*;

  logic [5:0]  alufn;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.alufn(alufn), .a(a), .b(b), .y(y));

  // ALU function codes and the opcode whose result each one must give.
  localparam logic [5:0] FN  [11] = '{6'b000000, 6'b000001, 6'b110011, 6'b110101,
                                      6'b110111, 6'b011000, 6'b011110, 6'b010110,
                                      6'b100000, 6'b100001, 6'b100011};
  localparam logic [5:0] OPS [11] = '{6'h20, 6'h21, 6'h24, 6'h25, 6'h26, 6'h28,
                                      6'h29, 6'h2A, 6'h2C, 6'h2D, 6'h2E};

  localparam logic [31:0] CORNER [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                                         32'h8000_0000, 32'h8000_0001, 32'h1F, 32'h20};

  task automatic try(input int f, input logic [31:0] va, input logic [31:0] vb);
    logic [31:0] e;
    alufn = FN[f]; a = va; b = vb;
    #1;
    e = compute(OPS[f], va, vb);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL alufn=%b a=%h b=%h y=%h expected %h", FN[f], va, vb, y, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 11; f++) begin
      foreach (CORNER[i]) foreach (CORNER[j]) try(f, CORNER[i], CORNER[j]);
      for (int k = 0; k < 500; k++) try(f, $urandom, $urandom);
      for (int k = 0; k < 200; k++) begin
        logic [31:0] r;
        r = $urandom;
        try(f, r, r);            // equal operands
        try(f, r, r + 32'd1);    // neighbours
        try(f, r, 32'($urandom_range(0, 31)));  // shift-sized operand
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
