// beta_system: a Beta processor (beta) wired to its main memory
// (main_memory), forming a complete computer that runs a straight-line
// program from address 0.
//
// Hold reset high across the first rising edge of clk: the PC loads zero
// and no memory write can happen. From the next edge on, one instruction
// completes per cycle. The processor's memory signals are brought out as
// outputs so that a test bench can compare them cycle by cycle with a
// reference, sampling just before each rising edge (after the instruction
// has executed but before its results are stored). The program is placed
// in u_mem.u_ram.mem before reset is released.
module beta_system #(
  parameter int unsigned MEM_NLOC = 1024
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] ia,
  output logic [31:0] id,
  output logic [31:0] ma,
  output logic        moe,
  output logic [31:0] mrd,
  output logic        wr,
  output logic [31:0] mwd
);

  beta u_beta (
    .clk  (clk),
    .reset(reset),
    .ia   (ia),
    .id   (id),
    .ma   (ma),
    .moe  (moe),
    .mrd  (mrd),
    .wr   (wr),
    .mwd  (mwd)
  );

  main_memory #(.NLOC(MEM_NLOC)) u_mem (
    .clk(clk),
    .ia (ia),
    .id (id),
    .ma (ma),
    .moe(moe),
    .mrd(mrd),
    .wr (wr),
    .mwd(mwd)
  );

endmodule
