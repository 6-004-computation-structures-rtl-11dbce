// main_memory: the Beta's word-addressed main memory, holding both program
// and data.
//
// NLOC 32-bit words (1024 by default) in a ram_2r1w with three ports:
//   port 1  instruction read, always enabled: id = mem[ia[11:2]]
//   port 2  data read, enabled by moe:        mrd = mem[ma[11:2]], else 0
//   port 3  data write on the rising edge of clk when wr = 1:
//           mem[ma[11:2]] <= mwd
// Only the word-address bits of ia and ma are used ([11:2] for 1024 words),
// so byte addresses wrap modulo 4*NLOC; the other address bits are
// deliberately unused. Reads are combinational; a load
// after a store to the same word sees the stored value. Initial contents are
// undefined; a program is loaded into u_ram.mem before reset is released.
// The port wiring is that of the memory the Beta is tested with; the
// processor's block diagram draws instruction and data memory as two
// boxes, which are the two views of this one array.
module main_memory #(
  parameter int unsigned NLOC = 1024,
  parameter int unsigned AW   = $clog2(NLOC)
) (
  input  logic        clk,
  input  logic [31:0] ia,
  output logic [31:0] id,
  input  logic [31:0] ma,
  input  logic        moe,
  output logic [31:0] mrd,
  input  logic        wr,
  input  logic [31:0] mwd
);

  ram_2r1w #(
    .WIDTH(32),
    .NLOC (NLOC),
    .AW   (AW)
  ) u_ram (
    .clk     (clk),
    .rd0_oe  (1'b1),
    .rd0_addr(ia[AW+1:2]),
    .rd0_data(id),
    .rd1_oe  (moe),
    .rd1_addr(ma[AW+1:2]),
    .rd1_data(mrd),
    .wr_en   (wr),
    .wr_addr (ma[AW+1:2]),
    .wr_data (mwd)
  );

endmodule
