// tb_pk_memory: self-checking test of the shared operand memory.
//
// Writes words through the 32-bit host port and through the unit write
// ports, reads them back through all ports (each port at a different word), and checks the write priority
// when the bus and two units write the same word in one cycle.
module tb_pk_memory;
  import rsa_ecc_pkg::*;

  localparam int unsigned N_MAX = 64;
  localparam int unsigned NU    = 3;
  localparam int unsigned OPW   = DIGIT * (N_MAX / DIGIT + 2);
  localparam int unsigned NCH   = (OPW + BUS_W - 1) / BUS_W;
  localparam int unsigned CHB   = $clog2(NCH);
  localparam int unsigned MW    = NCH * BUS_W;

  logic clk = 1'b0;
  logic bus_we = 1'b0;
  logic [AW-1:0] bus_word;
  logic [CHB-1:0] bus_chunk;
  logic [BUS_W-1:0] bus_wdata, bus_rdata;
  logic [AW-1:0]  u_rd_addr [NU];
  logic [OPW-1:0] u_rd_data [NU];
  logic           u_wr_en   [NU];
  logic [AW-1:0]  u_wr_addr [NU];
  logic [OPW-1:0] u_wr_data [NU];
  logic [MW-1:0]  model [NWORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pk_memory #(.N_MAX(N_MAX), .NU(NU)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(input int w);
    logic [MW-1:0] got;
    for (int u = 0; u < NU; u++) u_rd_addr[u] = AW'((w + 5 * u) % NWORDS);
    bus_word = AW'(w);
    for (int c = 0; c < NCH; c++) begin
      bus_chunk = CHB'(c);
      #1 got[BUS_W*c +: BUS_W] = bus_rdata;
    end
    checks++;
    if (got != model[w]) begin
      failures++;
      $display("FAIL bus read word %0d: %h want %h", w, got, model[w]);
    end
    for (int u = 0; u < NU; u++) begin
      checks++;
      if (u_rd_data[u] != model[(w + 5 * u) % NWORDS][OPW-1:0]) begin
        failures++;
        $display("FAIL unit %0d read word %0d", u, (w + 5 * u) % NWORDS);
      end
    end
  endtask

  initial begin
    for (int u = 0; u < NU; u++) begin
      u_wr_en[u] = 1'b0; u_wr_addr[u] = '0; u_wr_data[u] = '0; u_rd_addr[u] = '0;
    end
    bus_word = '0; bus_chunk = '0; bus_wdata = '0;
    // Fill every word over the bus.
    for (int w = 0; w < NWORDS; w++)
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        bus_we = 1'b1; bus_word = AW'(w); bus_chunk = CHB'(c); bus_wdata = $urandom;
        model[w][BUS_W*c +: BUS_W] = bus_wdata;
      end
    @(negedge clk); bus_we = 1'b0;
    for (int w = 0; w < NWORDS; w++) check_word(w);
    // Unit writes, one per port, different words.
    for (int it = 0; it < 50; it++) begin
      @(negedge clk);
      for (int u = 0; u < NU; u++) begin
        u_wr_en[u]   = 1'b1;
        u_wr_addr[u] = AW'((it * NU + u) % NWORDS);
        for (int i = 0; i < OPW; i += 32) u_wr_data[u][i +: 32] = $urandom;
        model[(it * NU + u) % NWORDS] = MW'(u_wr_data[u]);
      end
      @(negedge clk);
      for (int u = 0; u < NU; u++) u_wr_en[u] = 1'b0;
      for (int w = 0; w < NWORDS; w++) check_word(w);
    end
    // Collision: units 1 and 2 write word 7, then the bus joins in.
    @(negedge clk);
    u_wr_en[1] = 1'b1; u_wr_addr[1] = 7; u_wr_data[1] = OPW'(64'h1111);
    u_wr_en[2] = 1'b1; u_wr_addr[2] = 7; u_wr_data[2] = OPW'(64'h2222);
    model[7] = MW'(64'h1111);
    @(negedge clk);
    check_word(7);
    bus_we = 1'b1; bus_word = 7; bus_chunk = 0; bus_wdata = 32'hABCD;
    model[7][31:0] = 32'hABCD;
    @(negedge clk);
    bus_we = 1'b0; u_wr_en[1] = 1'b0; u_wr_en[2] = 1'b0;
    check_word(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
