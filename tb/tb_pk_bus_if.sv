// tb_pk_bus_if: self-checking test of the host bus interface.
//
// Checks register writes and read-back (one-cycle read latency), the address
// decode of operand chunks, command pulses to idle units, dropping of a
// command to a busy unit with the sticky status flag, and clearing it.
module tb_pk_bus_if;
  import rsa_ecc_pkg::*;

  localparam int unsigned N_MAX = 4096;
  localparam int unsigned NU    = 3;
  localparam int unsigned L     = N_MAX / DIGIT;
  localparam int unsigned OPW   = DIGIT * (L + 2);
  localparam int unsigned NCH   = (OPW + BUS_W - 1) / BUS_W;
  localparam int unsigned CHB   = $clog2(NCH);
  localparam int unsigned LENW  = $clog2(L + 1);
  localparam int unsigned EBW   = $clog2(N_MAX + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] bus_addr = '0;
  logic [BUS_W-1:0] bus_wdata = '0, bus_rdata, mem_wdata, mem_rdata;
  logic bus_we = 1'b0, bus_re = 1'b0, mem_we;
  logic [AW-1:0] mem_word;
  logic [CHB-1:0] mem_chunk;
  logic [LENW-1:0] len;
  logic [EBW-1:0] ebits;
  logic [NU-1:0] cmd_valid, unit_busy = '0;
  cmd_t cmd;
  int checks = 0, failures = 0;
  int pulses [NU];

  always #5 clk = ~clk;
  // Stand-in for the memory: read data is a function of word and chunk.
  assign mem_rdata = {4'(mem_word), 8'h00, 20'(mem_chunk)} ^ 32'h5A5A0000;
  always @(posedge clk) for (int u = 0; u < NU; u++) if (cmd_valid[u]) pulses[u]++;

  pk_bus_if #(.N_MAX(N_MAX), .NU(NU)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1'b1;
    @(negedge clk); bus_we = 1'b0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_re = 1'b1;
    @(negedge clk); bus_re = 1'b0; d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    for (int u = 0; u < NU; u++) pulses[u] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wr(16'h0000, 32'd40);
    rd(16'h0000, d);  check(d == 40 && len == 40, "LEN");
    wr(16'h0001, 32'd4096);
    rd(16'h0001, d);  check(d == 4096 && ebits == 4096, "EBITS");
    // Chunk decode and data path to the memory.
    for (int k = 0; k < 50; k++) begin
      logic [AW-1:0] w;
      logic [CHB-1:0] c;
      w = AW'($urandom); c = CHB'($urandom % NCH);
      @(negedge clk);
      bus_addr = 16'h8000 | (16'(w) << CHB) | 16'(c); bus_wdata = $urandom; bus_we = 1'b1;
      #1 check(mem_we && mem_word == w && mem_chunk == c && mem_wdata == bus_wdata, "mem write");
      @(negedge clk); bus_we = 1'b0;
      rd(16'h8000 | (16'(w) << CHB) | 16'(c), d);
      check(d == ({4'(w), 8'h00, 20'(c)} ^ 32'h5A5A0000), "mem read");
    end
    // Commands to idle units.
    for (int u = 0; u < NU; u++) wr(16'h0004 + 16'(u), 32'h02ABCDE1);
    for (int u = 0; u < NU; u++) check(pulses[u] == 1, "command pulse");
    check(cmd == cmd_t'(26'h2ABCDE1), "command word");
    rd(16'h0002, d); check(d[16] == 1'b0, "no drop yet");
    // Command to a busy unit is dropped and flagged.
    unit_busy = 3'b010;
    wr(16'h0005, 32'h1);
    check(pulses[1] == 1, "drop when busy");
    rd(16'h0002, d); check(d[16] == 1'b1 && d[2:0] == 3'b010, "status busy + dropped");
    wr(16'h0002, 32'h0);
    rd(16'h0002, d); check(d[16] == 1'b0, "dropped cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
