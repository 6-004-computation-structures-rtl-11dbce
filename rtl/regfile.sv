// regfile: the Beta register file with its RA2SEL mux.
//
// Storage is a ram_2r1w with 31 locations of 32 bits, two read ports
// and one write port. Registers R0..R30 live in it; R31 has no location, so
// a write to R31 is dropped by the memory, and logic around both read ports
// forces the data to zero whenever the port address is 0b11111.
//
// Read port A always reads Ra. Read port B reads Rb when ra2sel = 0 and Rc
// when ra2sel = 1 (a store reads the register it stores through port B).
// Reads are combinational. When werf = 1, wdata is written into Rc at the
// rising edge of clk and appears on the read ports after that edge.
// Structure and port list follow the Beta description; the registers are
// not reset (their contents start undefined, as in the original).
module regfile
  import beta_pkg::*;
(
  input  logic        clk,
  input  logic        werf,
  input  logic        ra2sel,
  input  logic [4:0]  ra,
  input  logic [4:0]  rb,
  input  logic [4:0]  rc,
  input  logic [31:0] wdata,
  output logic [31:0] radata,
  output logic [31:0] rbdata
);

  logic [4:0]  ra2;
  logic [31:0] rd0_data, rd1_data;

  assign ra2 = ra2sel ? rc : rb;

  ram_2r1w #(
    .WIDTH(32),
    .NLOC (31)
  ) u_mem (
    .clk     (clk),
    .rd0_oe  (1'b1),
    .rd0_addr(ra),
    .rd0_data(rd0_data),
    .rd1_oe  (1'b1),
    .rd1_addr(ra2),
    .rd1_data(rd1_data),
    .wr_en   (werf),
    .wr_addr (rc),
    .wr_data (wdata)
  );

  assign radata = (ra  == R31) ? 32'h0 : rd0_data;
  assign rbdata = (ra2 == R31) ? 32'h0 : rd1_data;

endmodule
