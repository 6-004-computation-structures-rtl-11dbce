// tb_beta: directed test of the Beta processor on its own, with a simple
// memory model in the test bench (combinational reads, write at the rising
// edge when wr = 1, word address bits [11:2]).
//
// Part 1 runs the three-instruction example program
//   ADDC(R31,1,R0)  ADDC(R31,2,R1)  ADD(R0,R1,R2)
// = 0xC01F0001 0xC03F0002 0x80400800 and checks the ALU result on ma in
// each cycle (1, 2, 3). Part 2 stores and loads through negative and
// positive literals, checks that a store drives Rc (not Rb) onto mwd, that
// a load returns memory data into a register, that R31 reads as zero and
// that an unimplemented opcode changes nothing. Every value checked is
// worked out by hand in the comments. One instruction per cycle: ia must
// advance by 4 on every edge.
module tb_beta;
  logic clk = 1'b1, reset;
  logic [31:0] ia, id, ma, mrd, mwd;
  logic moe, wr;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0;

  beta dut (.clk(clk), .reset(reset), .ia(ia), .id(id), .ma(ma), .moe(moe),
            .mrd(mrd), .wr(wr), .mwd(mwd));

  assign id  = mem[ia[11:2]];
  assign mrd = moe ? mem[ma[11:2]] : 32'h0;
  always @(posedge clk) if (wr) mem[ma[11:2]] <= mwd;

  always #50 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL t=%0t ia=%h %s=%h expected %h", $time, ia, what, got, want);
    end
  endtask

  // Check the state just before the edge that ends the current cycle.
  task automatic cyc(input logic [31:0] exp_ia, input logic [31:0] exp_ma,
                     input logic exp_moe, input logic exp_wr, input logic [31:0] exp_mwd,
                     input bit chk_mwd);
    check("ia", ia, exp_ia);
    check("ma", ma, exp_ma);
    check("moe", 32'(moe), 32'(exp_moe));
    check("wr", 32'(wr), 32'(exp_wr));
    if (chk_mwd) check("mwd", mwd, exp_mwd);
    @(posedge clk); #1;
  endtask

  initial begin
    #(100 * 200);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[k]) mem[k] = 32'h0;
    // Example program.
    mem[0] = 32'hC01F0001;  // ADDC(R31,1,R0)
    mem[1] = 32'hC03F0002;  // ADDC(R31,2,R1)
    mem[2] = 32'h80400800;  // ADD(R0,R1,R2)
    // Directed program.
    mem[3] = 32'hC07F0800;  // ADDC(R31,0x800,R3)        R3 = 0x800
    mem[4] = 32'hC09FFFF9;  // ADDC(R31,-7,R4)           R4 = 0xFFFFFFF9
    mem[5] = 32'h6483FFFC;  // ST(R4,-4,R3)              M[0x7FC] = R4
    mem[6] = 32'h60A3FFFC;  // LD(R3,-4,R5)              R5 = M[0x7FC]
    mem[7] = 32'h64430010;  // ST(R2,16,R3)              M[0x810] = R2 = 3
    mem[8] = 32'h60E30010;  // LD(R3,16,R7)              R7 = M[0x810]
    mem[9] = 32'h811F2800;  // ADD(R31,R5,R8)            R8 = R5
    mem[10] = {6'h1D, 5'd4, 5'd4, 16'hFFFF}; // opcode 0x1D, unimplemented: R4 kept
    mem[11] = {6'h3E, 5'd9, 5'd4, 16'd1};   // SRAC(R4,1,R9) R9 = 0xFFFFFFFC
    mem[12] = {6'h20, 5'd31, 5'd9, 5'd9, 11'd0}; // ADD(R9,R9,R31) result dropped
    mem[13] = {6'h21, 5'd10, 5'd31, 5'd8, 11'd0}; // SUB(R31,R8,R10) R10 = 7
    mem[14] = {6'h25, 5'd11, 5'd8, 5'd10, 11'd0}; // CMPLT(R8,R10,R11) = 1
    mem[15] = {6'h20, 5'd12, 5'd31, 5'd31, 11'd0}; // ADD(R31,R31,R12) = 0

    reset = 1'b1;
    @(posedge clk); #1;
    reset = 1'b0;
    //   ia      ma          moe   wr    mwd
    cyc(32'h00, 32'h1,        0,    0,    0, 0);
    cyc(32'h04, 32'h2,        0,    0,    0, 0);
    cyc(32'h08, 32'h3,        0,    0,    32'h2, 1);     // mwd = R1 (Rb)
    cyc(32'h0C, 32'h800,      0,    0,    0, 0);
    cyc(32'h10, 32'hFFFFFFF9, 0,    0,    0, 0);
    cyc(32'h14, 32'h7FC,      0,    1,    32'hFFFFFFF9, 1); // store R4
    cyc(32'h18, 32'h7FC,      1,    0,    0, 0);
    cyc(32'h1C, 32'h810,      0,    1,    32'h3, 1);     // store R2 = 3
    cyc(32'h20, 32'h810,      1,    0,    0, 0);
    cyc(32'h24, 32'hFFFFFFF9, 0,    0,    32'hFFFFFFF9, 1); // R8 = R5
    check("wr during NOP", 32'(wr), 0);
    @(posedge clk); #1;                                   // unimplemented
    cyc(32'h2C, 32'hFFFFFFFC, 0,    0,    0, 0);          // SRAC
    cyc(32'h30, 32'hFFFFFFF8, 0,    0,    32'hFFFFFFFC, 1); // R9+R9 into R31
    cyc(32'h34, 32'h7,        0,    0,    32'hFFFFFFF9, 1); // 0 - R8
    cyc(32'h38, 32'h1,        0,    0,    32'h7, 1);     // -7 < 7
    cyc(32'h3C, 32'h0,        0,    0,    32'h0, 1);     // R31 + R31
    // Register contents, read back through the hierarchy.
    check("R2", dut.u_regfile.u_mem.mem[2], 32'h3);
    check("R5", dut.u_regfile.u_mem.mem[5], 32'hFFFFFFF9);
    check("R7", dut.u_regfile.u_mem.mem[7], 32'h3);
    check("R10", dut.u_regfile.u_mem.mem[10], 32'h7);
    check("R11", dut.u_regfile.u_mem.mem[11], 32'h1);
    check("M[0x7FC]", mem[32'h7FC >> 2], 32'hFFFFFFF9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
