// tb_pc: the program counter loads 0 on a rising edge with reset = 1 and
// then advances by exactly 4 per clock cycle (one instruction per cycle);
// a later reset returns it to 0 on the next edge.
module tb_pc;
  logic clk = 1'b0, reset;
  logic [31:0] ia;
  logic [31:0] expected;
  int checks = 0, failures = 0;

  pc dut (.clk(clk), .reset(reset), .ia(ia));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ia();
    checks++;
    if (ia !== expected) begin
      failures++;
      $display("FAIL t=%0t ia=%h expected %h", $time, ia, expected);
    end
  endtask

  initial begin
    reset = 1'b1;
    @(posedge clk); #1;
    expected = 32'h0;
    check_ia();
    reset = 1'b0;
    for (int c = 0; c < 1500; c++) begin
      @(posedge clk); #1;
      expected += 32'd4;
      check_ia();
      if (c == 700) begin
        reset = 1'b1;
        @(posedge clk); #1;
        expected = 32'h0;
        check_ia();
        reset = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
