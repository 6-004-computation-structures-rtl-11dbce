// tb_ram_2r1w: random reads and writes on a 31-location memory (not a
// power of two, as in the register file), compared with an array model:
// combinational reads on both ports, write at the rising edge, output
// enable, writes and reads beyond the last location ignored / zero.
module tb_ram_2r1w;
  localparam int NLOC = 31;
  logic clk = 1'b0;
  logic rd0_oe, rd1_oe, wr_en;
  logic [4:0] rd0_addr, rd1_addr, wr_addr;
  logic [15:0] rd0_data, rd1_data, wr_data;
  logic [15:0] model [32];
  logic [31:0] written = '0;
  int checks = 0, failures = 0;

  ram_2r1w #(.WIDTH(16), .NLOC(NLOC)) dut (
    .clk(clk),
    .rd0_oe(rd0_oe), .rd0_addr(rd0_addr), .rd0_data(rd0_data),
    .rd1_oe(rd1_oe), .rd1_addr(rd1_addr), .rd1_data(rd1_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always #5 clk = ~clk;

  function automatic logic [15:0] expect_rd(input logic oe, input logic [4:0] ad);
    if (!oe || ad >= 5'(NLOC)) return 16'h0;
    return model[ad];
  endfunction

  task automatic check_port(input int p, input logic oe, input logic [4:0] ad,
                            input logic [15:0] got);
    // Locations never written hold undefined data; skip those.
    if (oe && ad < 5'(NLOC) && !written[ad]) return;
    checks++;
    if (got !== expect_rd(oe, ad)) begin
      failures++;
      $display("FAIL port%0d oe=%b addr=%0d data=%h expected %h", p, oe, ad, got,
               expect_rd(oe, ad));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; rd0_oe = 1'b0; rd1_oe = 1'b0;
    rd0_addr = '0; rd1_addr = '0; wr_addr = '0; wr_data = '0;
    // Fill every location once.
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 5'(k); wr_data = 16'($urandom);
      @(posedge clk);
      if (k < NLOC) begin model[k] = wr_data; written[k] = 1'b1; end
    end
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      rd0_oe = ($urandom_range(0, 9) != 0);
      rd1_oe = ($urandom_range(0, 9) != 0);
      rd0_addr = 5'($urandom); rd1_addr = 5'($urandom);
      wr_en = 1'($urandom); wr_addr = 5'($urandom); wr_data = 16'($urandom);
      #1;
      check_port(0, rd0_oe, rd0_addr, rd0_data);
      check_port(1, rd1_oe, rd1_addr, rd1_data);
      @(posedge clk);
      if (wr_en && wr_addr < 5'(NLOC)) model[wr_addr] = wr_data;
      #1;
      // The value written is visible on the read ports right after the edge.
      check_port(0, rd0_oe, rd0_addr, rd0_data);
      check_port(1, rd1_oe, rd1_addr, rd1_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
