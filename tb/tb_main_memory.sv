// tb_main_memory: word addressing through address bits [11:2], instruction
// port always enabled, data read port gated by moe, write port gated by wr,
// writes visible on both read ports after the rising edge. Compared with a
// 1024-word model.
module tb_main_memory;
  logic clk = 1'b0;
  logic [31:0] ia, id, ma, mrd, mwd;
  logic moe, wr;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  main_memory dut (.clk(clk), .ia(ia), .id(id), .ma(ma), .moe(moe), .mrd(mrd),
                   .wr(wr), .mwd(mwd));

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
    ia = '0; ma = '0; moe = 1'b0; wr = 1'b0; mwd = '0;
    // Write every word through the data port, using junk in the unused bits.
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk);
      wr = 1'b1; ma = {20'($urandom), 10'(k), 2'($urandom)}; mwd = $urandom;
      @(posedge clk);
      model[k] = mwd;
    end
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      ia = $urandom; ma = $urandom; moe = 1'($urandom); wr = 1'($urandom); mwd = $urandom;
      #1;
      check("id", id, model[ia[11:2]]);
      check("mrd", mrd, moe ? model[ma[11:2]] : 32'h0);
      @(posedge clk);
      if (wr) model[ma[11:2]] = mwd;
      #1;
      check("id after edge", id, model[ia[11:2]]);
      check("mrd after edge", mrd, moe ? model[ma[11:2]] : 32'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
