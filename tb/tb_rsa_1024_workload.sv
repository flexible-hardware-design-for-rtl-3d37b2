// tb_rsa_1024_workload: RSA-1024 private-key exponentiation, the smallest RSA
// workload of the source's performance table, on the accelerator at its
// default size (N_MAX = 4096).
//
// Sets LEN = 256 digits and EBITS = 1024, loads a random odd 1024-bit
// modulus N, a message M, a random 1024-bit exponent d and R^2 mod N
// (R = 2^1028), runs one MOP_EXP on MMM/E 1 and, in parallel, a 1024-bit
// MOP_MUL on MMM/E 2. Results are compared with M^d mod N and M*M*R^-1 mod N
// from integer arithmetic; the exponentiation time must be
// 5 + K*(3*256+8) cycles with K = 3 + 1024 + (one bits of d). The time at
// 53 MHz is printed for comparison with the 22.8 ms reported for one
// multiplier.
module tb_rsa_1024_workload;
  import rsa_ecc_pkg::*;

  localparam int unsigned N_MAX = 4096;
  localparam int unsigned L     = N_MAX / DIGIT;
  localparam int unsigned OPW   = DIGIT * (L + 2);
  localparam int unsigned NCH   = (OPW + BUS_W - 1) / BUS_W;
  localparam int unsigned CHB   = $clog2(NCH);
  localparam int unsigned RW    = OPW + 32;
  localparam int unsigned NB    = 1024;
  localparam int unsigned LW    = NB / DIGIT;
  typedef logic [RW-1:0] wide_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] bus_addr = '0;
  logic [BUS_W-1:0] bus_wdata = '0, bus_rdata;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic [2:0] unit_busy, unit_done;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rsa_ecc_top dut (.*);

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
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

  task automatic bus_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1'b1;
    @(negedge clk); bus_we = 1'b0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_re = 1'b1;
    @(negedge clk); bus_re = 1'b0; d = bus_rdata;
  endtask

  task automatic put(input int w, input wide_t v);
    for (int c = 0; c < NCH; c++)
      bus_write(16'h8000 | 16'(w << CHB) | 16'(c), v[BUS_W*c +: BUS_W]);
  endtask

  task automatic get(input int w, output wide_t v);
    logic [31:0] d;
    v = '0;
    for (int c = 0; c < NCH; c++) begin
      bus_read(16'h8000 | 16'(w << CHB) | 16'(c), d);
      v[BUS_W*c +: BUS_W] = d;
    end
  endtask

  function automatic logic [31:0] cmdw(input int op, a, b, c, m, d);
    cmd_t x;
    x = '0;
    x.op = 2'(op); x.a = AW'(a); x.b = AW'(b); x.c = AW'(c); x.m = AW'(m); x.d = AW'(d);
    return 32'(x);
  endfunction

  // a*b mod n by the interleaved shift-and-subtract method (a, b < n).
  function automatic wide_t modmul(input wide_t a, b, n);
    wide_t acc = '0;
    for (int i = OPW - 1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc >= n) acc -= n;
      if (b[i]) begin
        acc += a;
        if (acc >= n) acc -= n;
      end
    end
    return acc;
  endfunction

  initial begin
    wide_t n, msg, e, r, r2, cref, v;
    longint t0, t1;
    logic [31:0] s;
    int k;
    n = '0; msg = '0; e = '0;
    for (int i = 0; i < NB; i += 32) n[i +: 32] = $urandom;
    n[0] = 1'b1; n[NB-1] = 1'b1;
    for (int i = 0; i < NB; i += 32) msg[i +: 32] = $urandom;
    if (msg >= n) msg -= n;
    for (int i = 0; i < NB; i += 32) e[i +: 32] = $urandom;
    e[NB-1] = 1'b1;
    r  = 1;
    for (int i = 0; i < 4 * LW + 4; i++) begin
      r = r << 1;
      if (r >= n) r -= n;
    end
    r2 = modmul(r, r, n);
    cref = 1;
    for (int i = NB - 1; i >= 0; i--) begin
      cref = modmul(cref, cref, n);
      if (e[i]) cref = modmul(cref, msg, n);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bus_write(16'h0000, 32'(LW));
    bus_write(16'h0001, 32'(NB));
    put(0, n); put(1, msg); put(2, e); put(3, r2);
    bus_write(16'h0005, cmdw(MOP_EXP, 1, 2, 3, 0, 4));
    t0 = cyc;
    bus_write(16'h0006, cmdw(MOP_MUL, 1, 1, 0, 0, 5));
    while (!unit_done[1]) @(negedge clk);
    t1 = cyc;
    do bus_read(16'h0002, s); while (s[2:0] != 3'b000);
    get(4, v);
    check(v == cref, "RSA-1024 exponentiation");
    get(5, v);
    check(v < 2 * n && modmul(v >= n ? v - n : v, r, n) == modmul(msg, msg, n), "1024-bit Montgomery multiplication");
    k = 3 + NB + $countones(e);
    // t0 follows the command edge, t1 the edge that enters the write cycle.
    check(int'(t1 - t0) + 1 == 5 + k * (3 * LW + 8), "exponentiation cycle count");
    $display("RSA-1024 exponentiation: %0d cycles, %0.1f ms at 53 MHz", t1 - t0 + 1,
             real'(t1 - t0 + 1) / 53.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
