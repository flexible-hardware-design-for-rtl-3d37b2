// tb_mmm: self-checking test of the systolic Montgomery multiplier.
//
// Runs random multiplications at several operand lengths on a 128-bit array.
// For each, checks T*R == X*Y (mod N) with R = 2^(4*len+4), the bound T < 2N
// for inputs below 4N, and the latency of 3*len+7 cycles from start to done.
// Also runs inputs up to 2^(4*len+4) (the widest the array accepts) and checks
// only the congruence there. The reference uses wide integer arithmetic.
module tb_mmm;
  import rsa_ecc_pkg::*;

  localparam int unsigned N_MAX = 128;
  localparam int unsigned L     = N_MAX / DIGIT;
  localparam int unsigned OPW   = DIGIT * (L + 2);
  localparam int unsigned LENW  = $clog2(L + 1);
  localparam int unsigned RW    = 3 * OPW;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [LENW-1:0] len;
  logic [OPW-1:0]  x, y, n, t;
  logic busy, done;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mmm #(.N_MAX(N_MAX)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OPW-1:0] rnd(input int bits);
    logic [OPW-1:0] v = '0;
    for (int i = 0; i < OPW; i += 32) v[i +: 32] = $urandom;
    if (bits < OPW) v &= (OPW'(1) << bits) - 1;
    return v;
  endfunction

  task automatic run(input int l, input logic [OPW-1:0] xi, yi, ni, input bit bounded);
    logic [RW-1:0] lhs, rhs, nn;
    longint t0;
    int lat;
    // Sampling at falling edges: done seen after rising edge cyc is consumed
    // at the next rising edge, so the latency is the edge difference + 1.
    @(negedge clk);
    len = LENW'(l); x = xi; y = yi; n = ni; start = 1'b1;
    @(negedge clk); start = 1'b0; t0 = cyc;
    while (!done) @(negedge clk);
    lat = int'(cyc - t0) + 1;
    nn  = RW'(ni);
    lhs = (RW'(t) << (4 * l + 4)) % nn;
    rhs = (RW'(xi) * RW'(yi)) % nn;
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL congruence l=%0d x=%h y=%h n=%h t=%h", l, xi, yi, ni, t);
    end
    checks++;
    if (lat != 3 * l + 7) begin
      failures++;
      $display("FAIL latency l=%0d got %0d want %0d", l, lat, 3 * l + 7);
    end
    if (bounded) begin
      checks++;
      if (RW'(t) >= 2 * nn) begin
        failures++;
        $display("FAIL bound l=%0d t=%h n=%h", l, t, ni);
      end
    end
  endtask

  initial begin
    logic [OPW-1:0] nv, xv, yv;
    int l;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Small hand-checked case: len 1, N = 13, R = 256.
    run(1, 7, 11, 13, 1);
    for (int k = 0; k < 60; k++) begin
      l  = 1 + ($urandom % L);
      nv = rnd(4 * l) | 1;
      nv[4 * l - 1] = 1'b1;
      xv = rnd(4 * l + 2) % (4 * nv);
      yv = rnd(4 * l + 2) % (4 * nv);
      run(l, xv, yv, nv, 1);
    end
    // Worst-case inputs just below 4N and all-ones moduli.
    for (int l2 = 1; l2 <= L; l2 += 7) begin
      nv = (OPW'(1) << (4 * l2)) - 1;
      run(l2, 4 * nv - 1, 4 * nv - 1, nv, 1);
    end
    // Inputs up to the width the array accepts.
    for (int k = 0; k < 20; k++) begin
      l  = 1 + ($urandom % L);
      nv = rnd(4 * l) | 1;
      run(l, rnd(4 * l + 4), rnd(4 * l + 4), nv, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
