// pk_bus_if: host bus interface of the accelerator.
//
// A simple synchronous memory-mapped bus: bus_we writes bus_wdata to
// bus_addr; bus_re reads bus_addr and returns the data in bus_rdata one cycle
// later (registered). Address map (16-bit addresses):
//
//   0x0000  LEN     operand length in radix-16 digits (R = 2^(4*LEN+4))
//   0x0001  EBITS   exponent length in bits for MOP_EXP
//   0x0002  STATUS  read: bit u = unit u busy, bit 16 = command dropped
//                   because its unit was busy (sticky); write clears bit 16
//   0x0004+u CMD u  write a cmd_t word to start unit u
//                   (unit 0 = LNCP, units 1.. = MMM/E units)
//   0x8000 | word << CHB | chunk   32-bit chunk of an operand word, chunk 0
//                   holding the least significant bits
//
// A command written to a busy unit is not passed on; the unit's cmd_valid is
// a one-cycle pulse. From the source design: only that a bus connects the
// host with the memory and with each unit. Everything about the protocol and
// the map is this implementation's choice.
module pk_bus_if
  import rsa_ecc_pkg::*;
#(
  parameter int unsigned N_MAX = 4096,
  parameter int unsigned NU    = 3,
  localparam int unsigned L    = N_MAX / DIGIT,
  localparam int unsigned OPW  = DIGIT * (L + 2),
  localparam int unsigned NCH  = (OPW + BUS_W - 1) / BUS_W,
  localparam int unsigned CHB  = $clog2(NCH),
  localparam int unsigned LENW = $clog2(L + 1),
  localparam int unsigned EBW  = $clog2(N_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      bus_addr,
  input  logic [BUS_W-1:0] bus_wdata,
  input  logic             bus_we,
  input  logic             bus_re,
  output logic [BUS_W-1:0] bus_rdata,
  // operand memory, host side
  output logic             mem_we,
  output logic [AW-1:0]    mem_word,
  output logic [CHB-1:0]   mem_chunk,
  output logic [BUS_W-1:0] mem_wdata,
  input  logic [BUS_W-1:0] mem_rdata,
  // unit control
  output logic [LENW-1:0]  len,
  output logic [EBW-1:0]   ebits,
  output logic [NU-1:0]    cmd_valid,
  output cmd_t             cmd,
  input  logic [NU-1:0]    unit_busy
);

  localparam logic [15:0] A_LEN    = 16'h0000;
  localparam logic [15:0] A_EBITS  = 16'h0001;
  localparam logic [15:0] A_STATUS = 16'h0002;
  localparam logic [15:0] A_CMD0   = 16'h0004;

  logic is_mem;
  logic dropped;

  assign is_mem    = bus_addr[15];
  assign mem_we    = bus_we && is_mem;
  assign mem_word  = bus_addr[CHB +: AW];
  assign mem_chunk = bus_addr[CHB-1:0];
  assign mem_wdata = bus_wdata;
  assign cmd       = cmd_t'(bus_wdata[$bits(cmd_t)-1:0]);

  always_comb begin
    for (int u = 0; u < NU; u++)
      cmd_valid[u] = bus_we && !is_mem && (bus_addr == A_CMD0 + 16'(u)) && !unit_busy[u];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len       <= '0;
      ebits     <= '0;
      dropped   <= 1'b0;
      bus_rdata <= '0;
    end else begin
      if (bus_we && !is_mem) begin
        if (bus_addr == A_LEN)    len   <= bus_wdata[LENW-1:0];
        if (bus_addr == A_EBITS)  ebits <= bus_wdata[EBW-1:0];
        if (bus_addr == A_STATUS) dropped <= 1'b0;
        for (int u = 0; u < NU; u++)
          if (bus_addr == A_CMD0 + 16'(u) && unit_busy[u]) dropped <= 1'b1;
      end
      if (bus_re) begin
        if (is_mem)                    bus_rdata <= mem_rdata;
        else if (bus_addr == A_LEN)    bus_rdata <= BUS_W'(len);
        else if (bus_addr == A_EBITS)  bus_rdata <= BUS_W'(ebits);
        else if (bus_addr == A_STATUS) bus_rdata <= BUS_W'({dropped, 16'(unit_busy)});
        else                           bus_rdata <= '0;
      end
    end
  end

  a_no_read_write_same_cycle: assert property (@(posedge clk) disable iff (!rst_n) !(bus_we && bus_re))
    else $error("pk_bus_if: read and write in the same cycle");

endmodule
