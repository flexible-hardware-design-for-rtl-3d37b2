// rsa_ecc_top: RSA / elliptic-curve public-key accelerator.
//
// One Large Number Co-Processor (LNCP, unit 0) and NUM_MMM Montgomery
// multiplication/exponentiation units (MMM/E, units 1..NUM_MMM) share an
// operand memory. A host on the bus loads operands, then starts units by
// writing command words; units run concurrently, so a point addition or
// doubling can keep two multipliers and the adder busy at once, following a
// schedule kept by the host. RSA exponentiation runs inside one MMM/E unit.
//
// Parameters: N_MAX, the largest modulus in bits (4096, the largest RSA size
// evaluated in the source), and NUM_MMM (1 or 2; 2 is the configuration the
// source's point schedules use). See pk_bus_if for the bus protocol and
// address map, lncp and mmme for the operations.
module rsa_ecc_top
  import rsa_ecc_pkg::*;
#(
  parameter int unsigned N_MAX   = 4096,
  parameter int unsigned NUM_MMM = 2,
  localparam int unsigned NU     = NUM_MMM + 1,
  localparam int unsigned L      = N_MAX / DIGIT,
  localparam int unsigned OPW    = DIGIT * (L + 2),
  localparam int unsigned NCH    = (OPW + BUS_W - 1) / BUS_W,
  localparam int unsigned CHB    = $clog2(NCH),
  localparam int unsigned LENW   = $clog2(L + 1),
  localparam int unsigned EBW    = $clog2(N_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      bus_addr,
  input  logic [BUS_W-1:0] bus_wdata,
  input  logic             bus_we,
  input  logic             bus_re,
  output logic [BUS_W-1:0] bus_rdata,
  output logic [NU-1:0]    unit_busy,
  output logic [NU-1:0]    unit_done
);

  logic             mem_we;
  logic [AW-1:0]    mem_word;
  logic [CHB-1:0]   mem_chunk;
  logic [BUS_W-1:0] mem_wdata, mem_rdata;
  logic [LENW-1:0]  len;
  logic [EBW-1:0]   ebits;
  logic [NU-1:0]    cmd_valid;
  cmd_t             cmd;

  logic [AW-1:0]    u_rd_addr [NU];
  logic [OPW-1:0]   u_rd_data [NU];
  logic             u_wr_en   [NU];
  logic [AW-1:0]    u_wr_addr [NU];
  logic [OPW-1:0]   u_wr_data [NU];

  pk_bus_if #(.N_MAX(N_MAX), .NU(NU)) u_bus (
    .clk, .rst_n,
    .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata,
    .mem_we, .mem_word, .mem_chunk, .mem_wdata, .mem_rdata,
    .len, .ebits, .cmd_valid, .cmd, .unit_busy
  );

  pk_memory #(.N_MAX(N_MAX), .NU(NU)) u_mem (
    .clk,
    .bus_we   (mem_we),
    .bus_word (mem_word),
    .bus_chunk(mem_chunk),
    .bus_wdata(mem_wdata),
    .bus_rdata(mem_rdata),
    .u_rd_addr, .u_rd_data, .u_wr_en, .u_wr_addr, .u_wr_data
  );

  lncp #(.N_MAX(N_MAX)) u_lncp (
    .clk, .rst_n,
    .cmd_valid(cmd_valid[0]),
    .cmd,
    .busy   (unit_busy[0]),
    .done   (unit_done[0]),
    .rd_addr(u_rd_addr[0]),
    .rd_data(u_rd_data[0]),
    .wr_en  (u_wr_en[0]),
    .wr_addr(u_wr_addr[0]),
    .wr_data(u_wr_data[0])
  );

  for (genvar u = 1; u < NU; u++) begin : g_mmme
    mmme #(.N_MAX(N_MAX)) u_mmme (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[u]),
      .cmd,
      .len, .ebits,
      .busy   (unit_busy[u]),
      .done   (unit_done[u]),
      .rd_addr(u_rd_addr[u]),
      .rd_data(u_rd_data[u]),
      .wr_en  (u_wr_en[u]),
      .wr_addr(u_wr_addr[u]),
      .wr_data(u_wr_data[u])
    );
  end

endmodule
