// tb_beta_system: end-to-end test of the Beta with its 1024-word memory, at
// the design's default sizes.
//
// A random straight-line program is generated and placed in memory words
// 0..NPROG-1; words 512..1023 are a data area filled with random values.
// The program first loads every register R0..R30 with ADDC from R31 (R30
// gets the data base 0xC00), then runs random instructions: all 22 operate
// instructions with random registers (R31 included), loads and stores at
// R30 plus a signed word offset, and some unimplemented opcodes, which must
// act as no-ops. Destination R30 is never used so the base stays valid.
//
// An instruction-level model runs alongside. Just before each rising edge
// (after the instruction has executed, before its results are stored) the
// test compares ia, and for implemented instructions ma, moe, wr and mwd,
// with the model, as a checkoff would. Every instruction must take exactly
// one cycle. Reset is held for the first edge, and applied once more in the
// middle of the run while a store is being executed: the store must not
// reach memory and the program restarts at address 0.
//
// Mechanisms counted (each must occur): every one of the 24 opcodes,
// R31 read as an operand, a write to R31 discarded, a negative literal,
// a load from a word stored earlier, an unimplemented opcode, and a store
// suppressed by reset.
module tb_beta_system;
  import beta_ref_pkg::*;

  localparam int NPROG     = 480;        // program words
  localparam int DATA_BASE = 32'hC00;    // value of R30
  localparam int NDATA_LO  = 512;        // first data word

  logic clk = 1'b1, reset;
  logic [31:0] ia, id, ma, mrd, mwd;
  logic moe, wr;

  beta_system dut (.clk(clk), .reset(reset), .ia(ia), .id(id), .ma(ma), .moe(moe),
                   .mrd(mrd), .wr(wr), .mwd(mwd));

  // 100-unit cycle; the first rising edge comes one period into the run.
  always #50 clk = ~clk;

  logic [31:0] prog [NPROG];
  logic [31:0] mmem [1024];
  logic [31:0] regs [32];
  logic        stored [1024];
  logic [31:0] pc_m;
  int checks = 0, failures = 0;
  int op_count [64];
  int n_r31_read = 0, n_r31_write = 0, n_neg_lit = 0, n_ld_after_st = 0;
  int n_nop = 0, n_reset_store = 0, n_cycles = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL t=%0t pc=%h instr=%h %s=%h expected %h", $time, pc_m,
                 mmem[pc_m[11:2]], what, got, want);
    end
  endtask

  function automatic int rnd_reg_src();
    return ($urandom_range(0, 9) == 0) ? 31 : $urandom_range(0, 29);
  endfunction

  function automatic int rnd_reg_dst();
    return ($urandom_range(0, 11) == 0) ? 31 : $urandom_range(0, 29);
  endfunction

  function automatic logic [31:0] rnd_instr();
    int kind = $urandom_range(0, 99);
    logic [5:0] op;
    if (kind < 15) begin
      // load or store at R30 + offset, offset a multiple of 4 in -0x80..0x7C
      op = (kind < 8) ? OPC_LD : OPC_ST;
      return enc_c(op, (op == OPC_LD) ? rnd_reg_dst() : rnd_reg_src(), 30,
                   16'(($urandom_range(0, 63) - 32) * 4));
    end
    if (kind < 20) begin
      // an opcode outside the implemented set
      do op = 6'($urandom); while (is_impl(op));
      return {op, 26'($urandom)};
    end
    do op = IMPL_OPS[$urandom_range(2, 23)]; while (!is_alu_op(op));
    if (uses_literal(op)) begin
      logic [15:0] lit = 16'($urandom);
      if (op[3:2] == 2'b11) lit = 16'($urandom_range(0, 40));   // shift counts
      if ($urandom_range(0, 3) == 0) lit = 16'($urandom_range(0, 3)) - 16'd2;
      return enc_c(op, rnd_reg_dst(), rnd_reg_src(), lit);
    end
    return enc_r(op, rnd_reg_dst(), rnd_reg_src(), rnd_reg_src());
  endfunction

  // Checks one instruction just before the edge that completes it, then
  // applies its effect to the model.
  task automatic step(input bit in_reset);
    logic [31:0] instr, a, b, res, ra2v;
    logic [5:0]  op;
    int rc, ra, rb;
    instr = mmem[pc_m[11:2]];
    op = instr[31:26]; rc = int'(instr[25:21]); ra = int'(instr[20:16]);
    rb = int'(instr[15:11]);
    a = regs[ra];
    b = uses_literal(op) ? sext16(instr[15:0]) : regs[rb];
    res = compute(op, a, b);
    ra2v = (op == OPC_ST) ? regs[rc] : regs[rb];

    if (!in_reset) check("ia", ia, pc_m);
    check("wr", 32'(wr), 32'((op == OPC_ST) && !in_reset));
    if (is_impl(op)) begin
      check("ma", ma, res);
      check("moe", 32'(moe), 32'(op == OPC_LD));
      if (op == OPC_ST || !uses_literal(op)) check("mwd", mwd, ra2v);
    end

    @(posedge clk);
    if (is_impl(op)) begin
      op_count[op]++;
      if (ra == 31 || (!uses_literal(op) && rb == 31)) n_r31_read++;
      if (uses_literal(op) && instr[15]) n_neg_lit++;
    end else begin
      n_nop++;
    end
    if (op == OPC_LD && stored[res[11:2]]) n_ld_after_st++;
    if (op == OPC_ST && in_reset) n_reset_store++;
    // Register write (also during reset: only memory writes are blocked).
    if (is_alu_op(op) || op == OPC_LD) begin
      if (rc == 31) n_r31_write++;
      else regs[rc] = (op == OPC_LD) ? mmem[res[11:2]] : res;
    end
    if (op == OPC_ST && !in_reset) begin
      mmem[res[11:2]] = ra2v;
      stored[res[11:2]] = 1'b1;
    end
    pc_m = in_reset ? 32'h0 : pc_m + 32'd4;
    n_cycles++;
    #1;
  endtask

  initial begin
    #(100 * 4000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int restart_at;
    bit restarted;
    // Program: register initialisation, then random instructions.
    for (int r = 0; r < 30; r++) prog[r] = enc_c(6'h30, r, 31, 16'($urandom));
    prog[30] = enc_c(6'h30, 30, 31, 16'(DATA_BASE));
    for (int k = 31; k < NPROG; k++) prog[k] = rnd_instr();
    // Make sure every implemented opcode appears at least once.
    foreach (IMPL_OPS[i]) begin
      automatic int slot = 31 + 2 * i;
      if (IMPL_OPS[i] == OPC_LD || IMPL_OPS[i] == OPC_ST)
        prog[slot] = enc_c(IMPL_OPS[i], 3, 30, 16'hFF00);
      else if (uses_literal(IMPL_OPS[i]))
        prog[slot] = enc_c(IMPL_OPS[i], 4, 31, 16'hFFFE);
      else
        prog[slot] = enc_r(IMPL_OPS[i], 5, 31, 6);
    end
    // Memory image.
    foreach (mmem[k]) begin
      mmem[k] = (k < NPROG) ? prog[k] : $urandom;
      stored[k] = 1'b0;
      dut.u_mem.u_ram.mem[k] = mmem[k];
    end
    regs[31] = 32'h0;
    for (int r = 0; r < 31; r++) regs[r] = 32'h0;

    // First edge with reset: the instruction at the random start PC has no
    // defined effect on registers, so only wr and the PC are checked.
    reset = 1'b1;
    #1;
    checks++;
    if (wr !== 1'b0) begin failures++; $display("FAIL wr high during reset"); end
    @(posedge clk); #1;
    reset = 1'b0;
    pc_m = 32'h0;
    check("ia after reset", ia, 32'h0);

    restart_at = -1;
    restarted = 1'b0;
    while (pc_m < 32'(NPROG * 4)) begin
      logic [31:0] instr;
      instr = mmem[pc_m[11:2]];
      if (!restarted && pc_m > 32'(120 * 4) && instr[31:26] == OPC_ST) begin
        reset = 1'b1;
        #1;
        step(1'b1);
        reset = 1'b0;
        restarted = 1'b1;
        check("ia after second reset", ia, 32'h0);
      end else begin
        step(1'b0);
      end
    end

    // Mechanism coverage.
    foreach (IMPL_OPS[i]) begin
      checks++;
      if (op_count[IMPL_OPS[i]] == 0) begin
        failures++; $display("FAIL opcode %h never executed", IMPL_OPS[i]);
      end
    end
    $display("cycles=%0d r31_read=%0d r31_write=%0d neg_literal=%0d load_after_store=%0d nop=%0d reset_store=%0d",
             n_cycles, n_r31_read, n_r31_write, n_neg_lit, n_ld_after_st, n_nop, n_reset_store);
    checks++; if (n_r31_read == 0)    begin failures++; $display("FAIL no R31 read"); end
    checks++; if (n_r31_write == 0)   begin failures++; $display("FAIL no R31 write"); end
    checks++; if (n_neg_lit == 0)     begin failures++; $display("FAIL no negative literal"); end
    checks++; if (n_ld_after_st == 0) begin failures++; $display("FAIL no load after store"); end
    checks++; if (n_nop == 0)         begin failures++; $display("FAIL no unimplemented opcode"); end
    checks++; if (n_reset_store == 0) begin failures++; $display("FAIL no store under reset"); end
    // One instruction per cycle: the run took exactly as many edges as
    // instructions executed.
    checks++;
    if (ia !== 32'(NPROG * 4)) begin
      failures++; $display("FAIL final ia=%h expected %h", ia, NPROG * 4);
    end
    // Final memory contents of the data area.
    for (int k = NDATA_LO; k < 1024; k++) begin
      checks++;
      if (dut.u_mem.u_ram.mem[k] !== mmem[k]) begin
        failures++;
        if (failures < 20) $display("FAIL mem[%0d]=%h expected %h", k,
                                    dut.u_mem.u_ram.mem[k], mmem[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
