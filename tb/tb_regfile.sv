// tb_regfile: random register traffic against a 32-entry model in which
// R31 is always zero: read port A reads Ra, port B reads Rb or (ra2sel = 1)
// Rc, a write to Rc happens at the rising edge when werf = 1, and writes
// to R31 are lost.
module tb_regfile;
  logic clk = 1'b0;
  logic werf, ra2sel;
  logic [4:0] ra, rb, rc;
  logic [31:0] wdata, radata, rbdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int r31_writes = 0;

  regfile dut (.clk(clk), .werf(werf), .ra2sel(ra2sel), .ra(ra), .rb(rb), .rc(rc),
               .wdata(wdata), .radata(radata), .rbdata(rbdata));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL t=%0t %s=%h expected %h", $time, what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    werf = 1'b0; ra2sel = 1'b0; ra = '0; rb = '0; rc = '0; wdata = '0;
    model[31] = 32'h0;
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      werf = 1'b1; rc = 5'(k); wdata = $urandom;
      @(posedge clk);
      if (k != 31) model[k] = wdata;
    end
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      werf = 1'($urandom); ra2sel = 1'($urandom);
      ra = 5'($urandom); rb = 5'($urandom); rc = 5'($urandom);
      if ($urandom_range(0, 7) == 0) rc = 5'd31;
      if ($urandom_range(0, 7) == 0) ra = 5'd31;
      wdata = $urandom;
      #1;
      check("radata", radata, model[ra]);
      check("rbdata", rbdata, model[ra2sel ? rc : rb]);
      @(posedge clk);
      if (werf && rc != 5'd31) model[rc] = wdata;
      if (werf && rc == 5'd31) r31_writes++;
      #1;
      check("radata after write", radata, model[ra]);
      check("rbdata after write", rbdata, model[ra2sel ? rc : rb]);
    end
    checks++;
    if (r31_writes == 0) begin
      failures++;
      $display("FAIL no write to R31 was tried");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
