// ram_2r1w: a memory with two independent read ports and one write port
// sharing one storage array, after the multi-port memory device that the
// Beta uses both for its register file and for its main memory (both use
// exactly two read ports and one write port).
//
// Read ports are combinational: rdN_data shows location rdN_addr for as
// long as rdN_oe is 1. With rdN_oe = 0 the port does not drive its data;
// since this model is two-state it then returns zero (the original device
// leaves the wires undriven). The write port stores wr_data into wr_addr on
// the rising edge of clk when wr_en = 1; a read of the same location shows
// the new value after that edge.
//
// The address has ceil(log2(NLOC)) bits. When NLOC is not a power of two a
// write to a location that does not exist is ignored and a read of one
// returns zero (the original device returns undefined data). The array is
// not initialised, as in the original; a program or table is placed in
// `mem` from outside before use.
module ram_2r1w #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NLOC  = 1024,
  parameter int unsigned AW    = (NLOC > 1) ? $clog2(NLOC) : 1
) (
  input  logic             clk,
  // read port 0
  input  logic             rd0_oe,
  input  logic [AW-1:0]    rd0_addr,
  output logic [WIDTH-1:0] rd0_data,
  // read port 1
  input  logic             rd1_oe,
  input  logic [AW-1:0]    rd1_addr,
  output logic [WIDTH-1:0] rd1_data,
  // write port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [NLOC];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < NLOC)) mem[wr_addr] <= wr_data;
  end

  assign rd0_data = (rd0_oe && (32'(rd0_addr) < NLOC)) ? mem[rd0_addr] : '0;
  assign rd1_data = (rd1_oe && (32'(rd1_addr) < NLOC)) ? mem[rd1_addr] : '0;

endmodule
