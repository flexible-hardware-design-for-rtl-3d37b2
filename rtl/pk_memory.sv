// pk_memory: operand memory for public-key operations.
//
// Holds NWORDS (16) operand words of OPW bits, shared by the host bus and the
// arithmetic units. The host reads and writes 32-bit slices ("chunks") of a
// word; each unit has one full-width read port and one full-width write port.
// Words are stored padded to a whole number of 32-bit chunks; the padding
// bits read as zero once a word has been written.
//
// Timing: reads are combinational, writes take effect at the clock edge. If
// several ports write the same word in one cycle the bus wins, then the unit
// with the lowest index; the host is expected to schedule operations so that
// this does not happen. The array has no reset: words must be written before
// they are read.
//
// From the source design: a memory for PK operations between the bus and the
// units. Own choices: the size, the port arrangement and write priority.
module pk_memory
  import rsa_ecc_pkg::*;
#(
  parameter int unsigned N_MAX = 4096,
  parameter int unsigned NU    = 3,
  localparam int unsigned L    = N_MAX / DIGIT,
  localparam int unsigned OPW  = DIGIT * (L + 2),
  localparam int unsigned NCH  = (OPW + BUS_W - 1) / BUS_W,
  localparam int unsigned MW   = NCH * BUS_W,
  localparam int unsigned CHB  = $clog2(NCH)
) (
  input  logic             clk,
  // host port, one 32-bit chunk at a time
  input  logic             bus_we,
  input  logic [AW-1:0]    bus_word,
  input  logic [CHB-1:0]   bus_chunk,
  input  logic [BUS_W-1:0] bus_wdata,
  output logic [BUS_W-1:0] bus_rdata,
  // unit ports
  input  logic [AW-1:0]    u_rd_addr [NU],
  output logic [OPW-1:0]   u_rd_data [NU],
  input  logic             u_wr_en   [NU],
  input  logic [AW-1:0]    u_wr_addr [NU],
  input  logic [OPW-1:0]   u_wr_data [NU]
);

  logic [MW-1:0] mem [NWORDS];

  always_comb begin
    bus_rdata = mem[bus_word][BUS_W*bus_chunk +: BUS_W];
    for (int u = 0; u < NU; u++) u_rd_data[u] = mem[u_rd_addr[u]][OPW-1:0];
  end

  // Later assignments win: highest unit index first, bus last.
  always_ff @(posedge clk) begin
    for (int u = NU - 1; u >= 0; u--)
      if (u_wr_en[u]) mem[u_wr_addr[u]] <= MW'(u_wr_data[u]);
    if (bus_we) mem[bus_word][BUS_W*bus_chunk +: BUS_W] <= bus_wdata;
  end

endmodule
