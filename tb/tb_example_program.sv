// tb_example_program: runs the three-word example program
//   0xC01F0001  ADDC(R31,1,R0)
//   0xC03F0002  ADDC(R31,2,R1)
//   0x80400800  ADD(R0,R1,R2)
// on the complete system (processor and 1024-word memory at default size).
// The rest of memory holds zeros, which decode as an unimplemented opcode
// and so execute as no-ops. Checks, just before each rising edge: ia, the
// ALU result on ma (1, 2, 3), no memory write, and afterwards R0..R2 and
// that the following no-ops changed neither registers nor memory.
module tb_example_program;
  logic clk = 1'b1, reset;
  logic [31:0] ia, id, ma, mrd, mwd;
  logic moe, wr;
  int checks = 0, failures = 0;

  beta_system dut (.clk(clk), .reset(reset), .ia(ia), .id(id), .ma(ma), .moe(moe),
                   .mrd(mrd), .wr(wr), .mwd(mwd));

  always #50 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL t=%0t %s=%h expected %h", $time, what, got, want);
    end
  endtask

  initial begin
    #(100 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1024; k++) dut.u_mem.u_ram.mem[k] = 32'h0;
    dut.u_mem.u_ram.mem[0] = 32'hC01F0001;
    dut.u_mem.u_ram.mem[1] = 32'hC03F0002;
    dut.u_mem.u_ram.mem[2] = 32'h80400800;
    reset = 1'b1;
    @(posedge clk); #1;
    reset = 1'b0;
    for (int c = 0; c < 3; c++) begin
      check("ia", ia, 32'(4 * c));
      check("ma", ma, 32'(c + 1));
      check("wr", 32'(wr), 0);
      @(posedge clk); #1;
    end
    repeat (20) begin
      check("wr during no-op", 32'(wr), 0);
      @(posedge clk); #1;
    end
    check("ia after 23 cycles", ia, 32'(4 * 23));
    check("R0", dut.u_beta.u_regfile.u_mem.mem[0], 32'd1);
    check("R1", dut.u_beta.u_regfile.u_mem.mem[1], 32'd2);
    check("R2", dut.u_beta.u_regfile.u_mem.mem[2], 32'd3);
    for (int k = 3; k < 1024; k++) check("memory word", dut.u_mem.u_ram.mem[k], 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
