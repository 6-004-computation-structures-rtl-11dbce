// tb_ctl: walks all 64 opcodes with reset low and high and compares every
// control output with the value the instruction needs: which operand,
// which write-back source, which ALU function (checked by running the ALU
// reference on the selected function), whether registers or memory are
// written. Unimplemented opcodes must write nothing.
module tb_ctl;
  import beta_ref_pkg::*;

  logic       reset;
  logic [5:0] op;
  logic       ra2sel, bsel, wdsel, werf, moe, wr;
  logic [5:0] alufn;
  int checks = 0, failures = 0;
  int gated = 0;

  ctl dut (.reset(reset), .op(op), .ra2sel(ra2sel), .bsel(bsel), .alufn(alufn),
           .wdsel(wdsel), .werf(werf), .moe(moe), .wr(wr));

  // ALU code this test bench expects for each operation (low opcode bits).
  function automatic logic [5:0] fn_of(input logic [5:0] o);
    if (o == OPC_LD || o == OPC_ST) return 6'b000000;
    case (o[3:0])
      4'h0: return 6'b000000;  4'h1: return 6'b000001;
      4'h4: return 6'b110011;  4'h5: return 6'b110101;  4'h6: return 6'b110111;
      4'h8: return 6'b011000;  4'h9: return 6'b011110;  4'hA: return 6'b010110;
      4'hC: return 6'b100000;  4'hD: return 6'b100001;  4'hE: return 6'b100011;
      default: return 6'b000000;
    endcase
  endfunction

  task automatic expect_eq(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL op=%h reset=%b %s=%b expected %b", op, reset, what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int k = 0; k < 64; k++) begin
        reset = 1'(r);
        op = 6'(k);
        #1;
        expect_eq("werf", werf, is_alu_op(op) || op == OPC_LD);
        expect_eq("wr", wr, (op == OPC_ST) && !reset);
        if (op == OPC_ST && reset && !wr) gated++;
        if (is_impl(op)) begin
          expect_eq("moe", moe, op == OPC_LD);
          expect_eq("bsel", bsel, uses_literal(op));
          if (op == OPC_LD) expect_eq("wdsel", wdsel, 1'b1);
          if (is_alu_op(op)) expect_eq("wdsel", wdsel, 1'b0);
          if (op == OPC_ST || !uses_literal(op)) expect_eq("ra2sel", ra2sel, op == OPC_ST);
          checks++;
          if (alufn !== fn_of(op)) begin
            failures++;
            $display("FAIL op=%h alufn=%b expected %b", op, alufn, fn_of(op));
          end
        end
      end
    end
    checks++;
    if (gated != 1) begin
      failures++;
      $display("FAIL reset did not suppress the store write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
