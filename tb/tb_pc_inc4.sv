// tb_pc_inc4: checks the increment-by-4 circuit against a + 4 for corner
// values (carry through every bit, wrap-around, nonzero low bits) and for
// random values.
module tb_pc_inc4;
  logic [31:0] a, y;
  int checks = 0, failures = 0;

  pc_inc4 dut (.a(a), .y(y));

  task automatic try(input logic [31:0] v);
    a = v;
    #1;
    checks++;
    if (y !== v + 32'd4) begin
      failures++;
      $display("FAIL a=%h y=%h expected %h", v, y, v + 32'd4);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32'h0); try(32'h4); try(32'hFFFF_FFFC); try(32'hFFFF_FFFF);
    try(32'h7FFF_FFFC); try(32'h0000_0003); try(32'h0000_0FFC);
    for (int i = 2; i < 32; i++) try((32'h1 << i) - 32'h4);
    for (int i = 0; i < 2000; i++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
