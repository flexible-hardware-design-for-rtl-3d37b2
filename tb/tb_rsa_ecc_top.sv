// tb_rsa_ecc_top: end-to-end test of the accelerator through its host bus.
//
// Runs at N_MAX = 256 with two MMM/E units. A host model loads operands in
// 32-bit chunks, issues unit commands and polls status, and exercises:
//   * ECC point addition in Jacobian coordinates, scheduled over MMM/E 1,
//     MMM/E 2 and the LNCP row by row as in the point-addition schedule
//     (192-bit prime field, the NIST P-192 prime);
//   * ECC point doubling, scheduled the same way;
//   * RSA exponentiation (e = 65537, 256-bit modulus) on one unit while the
//     other multiplies;
//   * CRT decryption by the subtraction-free Garner variant x = s + p - t,
//     the two half-size exponentiations running in parallel;
//   * a command written to a busy unit (dropped and flagged in STATUS).
// References are computed independently with wide integer arithmetic: the
// point results are compared with affine addition/doubling (using modular
// inverses), the RSA results with square-and-multiply on integers.
// Mechanism counters (both multipliers busy at once, multiplier and LNCP
// busy at once, each opcode, multiply steps inside an exponentiation,
// operand length switches, dropped command) must all be non-zero.
module tb_rsa_ecc_top;
  import rsa_ecc_pkg::*;

  localparam int unsigned N_MAX = 256;
  localparam int unsigned L     = N_MAX / DIGIT;
  localparam int unsigned OPW   = DIGIT * (L + 2);
  localparam int unsigned NCH   = (OPW + BUS_W - 1) / BUS_W;
  localparam int unsigned CHB   = $clog2(NCH);
  localparam int unsigned NU    = 3;
  localparam int unsigned RW    = 4 * OPW;
  typedef logic [RW-1:0] wide_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] bus_addr = '0;
  logic [BUS_W-1:0] bus_wdata = '0, bus_rdata;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic [NU-1:0] unit_busy, unit_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_ecc_top #(.N_MAX(N_MAX), .NUM_MMM(2)) dut (.*);

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  int n_both_mmm = 0, n_mmm_lncp = 0, n_mul = 0, n_exp = 0, n_add = 0, n_sub = 0;
  int n_half = 0, n_mx = 0, n_len_switch = 0, n_drop = 0;
  logic [$clog2(L+1)-1:0] last_len = '0;
  always @(posedge clk) if (rst_n) begin
    if (unit_busy[1] && unit_busy[2]) n_both_mmm++;
    if (unit_busy[0] && (unit_busy[1] || unit_busy[2])) n_mmm_lncp++;
    if (dut.u_bus.cmd_valid[0]) begin
      if (dut.u_bus.cmd.op == LOP_ADD)  n_add++;
      if (dut.u_bus.cmd.op == LOP_SUB)  n_sub++;
      if (dut.u_bus.cmd.op == LOP_HALF) n_half++;
    end
    if (|dut.u_bus.cmd_valid[2:1]) begin
      if (dut.u_bus.cmd.op == MOP_MUL) n_mul++;
      if (dut.u_bus.cmd.op == MOP_EXP) n_exp++;
    end
    if (dut.g_mmme[1].u_mmme.u_mmm.start && dut.g_mmme[1].u_mmme.step == 3'd4) n_mx++;
    if (dut.u_bus.len != last_len) begin
      if (last_len != 0) n_len_switch++;
      last_len <= dut.u_bus.len;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------- host model
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

  function automatic logic [31:0] cmdw(input int op, a, b, c, m, d, k = 0);
    cmd_t x;
    x.op = 2'(op); x.a = AW'(a); x.b = AW'(b); x.c = AW'(c); x.m = AW'(m); x.d = AW'(d);
    x.k = 4'(k);
    return 32'(x);
  endfunction

  // unit: 0 = LNCP, 1 = MMM/E 1, 2 = MMM/E 2
  task automatic issue(input int unit, input logic [31:0] c);
    bus_write(16'h0004 + 16'(unit), c);
  endtask

  task automatic wait_idle();
    logic [31:0] s;
    do bus_read(16'h0002, s); while (s[NU-1:0] != '0);
  endtask

  // ------------------------------------------------------ reference models
  function automatic wide_t mulm(input wide_t a, b, m);
    return (a * b) % m;
  endfunction
  function automatic wide_t addm(input wide_t a, b, m);
    return (a + b) % m;
  endfunction
  function automatic wide_t subm(input wide_t a, b, m);
    return (a % m + m - b % m) % m;
  endfunction
  function automatic wide_t powm(input wide_t b, e, m);
    wide_t r = 1 % m;
    for (int i = RW - 1; i >= 0; i--) begin
      r = mulm(r, r, m);
      if (e[i]) r = mulm(r, b, m);
    end
    return r;
  endfunction
  // Inverse modulo m by the extended Euclidean algorithm.
  function automatic wide_t invm(input wide_t a, m);
    wide_t r0 = m, r1 = a % m, t0 = 0, t1 = 1, qq, tmp;
    while (r1 != 0) begin
      qq = r0 / r1;
      tmp = r0 - qq * r1; r0 = r1; r1 = tmp;
      tmp = (t0 + m - mulm(qq, t1, m)) % m; t0 = t1; t1 = tmp;
    end
    return t0;
  endfunction
  function automatic wide_t rnd(input int bits);
    wide_t v = '0;
    for (int i = 0; i < bits; i += 32) v[i +: 32] = $urandom;
    return v & ((wide_t'(1) << bits) - 1);
  endfunction

  // Checks that Jacobian (X, Y, Z), held in Montgomery form, is affine (x, y).
  task automatic check_point(input wide_t xm, ym, zm, x, y, p, rinv, input string what);
    wide_t X, Y, Z, zi;
    X = mulm(xm, rinv, p); Y = mulm(ym, rinv, p); Z = mulm(zm, rinv, p);
    zi = invm(Z, p);
    check(mulm(X, mulm(zi, zi, p), p) == x, {what, " x"});
    check(mulm(Y, mulm(zi, mulm(zi, zi, p), p), p) == y, {what, " y"});
    check(xm < (wide_t'(1) << (4 * L + 4)) && ym < (wide_t'(1) << (4 * L + 4)),
          {what, " operand range"});
  endtask

  localparam int MUL = 0, EXP = 1, ADD = 0, SUB = 1, HALF = 2;

  initial begin
    wide_t p, a, x1, y1, x2, y2, x3, y3, xd, yd, lam, R, Rm, rinv, z1, z2, v;
    wide_t xa, ya, za;
    wide_t n, e, msg, c_ref, pp, qq, nn, d, cc, m_ref, u;
    logic [31:0] s;
    int le;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ================================================ ECC over GF(P-192)
    p  = (wide_t'(1) << 192) - (wide_t'(1) << 64) - 1;
    le = 48;                                   // 192-bit operands
    bus_write(16'h0000, 32'(le));
    R    = (wide_t'(1) << (4 * le + 4)) % p;   // Montgomery R mod p
    rinv = invm(R, p);
    // Curve y^2 = x^3 + a x + b through P = (x1, y1); Q = 2P, expect P+Q = 3P.
    a  = rnd(190) % p; x1 = rnd(190) % p; y1 = rnd(190) % p;
    lam = mulm(addm(mulm(3, mulm(x1, x1, p), p), a, p), invm(mulm(2, y1, p), p), p);
    x2 = subm(mulm(lam, lam, p), mulm(2, x1, p), p);
    y2 = subm(mulm(lam, subm(x1, x2, p), p), y1, p);
    lam = mulm(subm(y2, y1, p), invm(subm(x2, x1, p), p), p);
    x3 = subm(subm(mulm(lam, lam, p), x1, p), x2, p);
    y3 = subm(mulm(lam, subm(x1, x3, p), p), y1, p);
    z1 = rnd(190) % p; z2 = rnd(190) % p;

    // ---- point addition, words: 0 p, 1-3 P, 4-6 Q, 7-15 temporaries
    put(0, p);
    put(1, mulm(mulm(x1, mulm(z1, z1, p), p), R, p));
    put(2, mulm(mulm(y1, mulm(z1, mulm(z1, z1, p), p), p), R, p));
    put(3, mulm(z1, R, p));
    put(4, mulm(mulm(x2, mulm(z2, z2, p), p), R, p));
    put(5, mulm(mulm(y2, mulm(z2, mulm(z2, z2, p), p), p), R, p));
    put(6, mulm(z2, R, p));
    issue(1, cmdw(MUL, 6, 6, 0, 0, 7));  issue(2, cmdw(MUL, 3, 3, 0, 0, 8));     wait_idle();
    issue(1, cmdw(MUL, 1, 7, 0, 0, 9));  issue(2, cmdw(MUL, 4, 8, 0, 0, 10));    wait_idle();
    issue(1, cmdw(MUL, 7, 6, 0, 0, 7));  issue(2, cmdw(MUL, 8, 3, 0, 0, 8));
    issue(0, cmdw(SUB, 9, 10, 0, 0, 11, 2));                                     wait_idle();
    issue(0, cmdw(ADD, 9, 10, 0, 0, 12));                                        wait_idle();
    issue(1, cmdw(MUL, 2, 7, 0, 0, 9));  issue(2, cmdw(MUL, 5, 8, 0, 0, 10));    wait_idle();
    issue(2, cmdw(MUL, 11, 11, 0, 0, 7));
    issue(0, cmdw(SUB, 9, 10, 0, 0, 13, 2));                                     wait_idle();
    issue(0, cmdw(ADD, 9, 10, 0, 0, 14));                                        wait_idle();
    issue(1, cmdw(MUL, 13, 13, 0, 0, 8)); issue(2, cmdw(MUL, 12, 7, 0, 0, 9));   wait_idle();
    issue(1, cmdw(MUL, 11, 7, 0, 0, 10)); issue(2, cmdw(MUL, 3, 6, 0, 0, 15));
    issue(0, cmdw(SUB, 8, 9, 0, 0, 1, 2));                                       wait_idle();
    issue(0, cmdw(ADD, 1, 1, 0, 0, 4));                                          wait_idle();
    issue(0, cmdw(SUB, 9, 4, 0, 0, 8, 8));                                       wait_idle();
    issue(1, cmdw(MUL, 14, 10, 0, 0, 7)); issue(2, cmdw(MUL, 8, 13, 0, 0, 9));   wait_idle();
    issue(1, cmdw(MUL, 15, 11, 0, 0, 3));
    issue(0, cmdw(SUB, 9, 7, 0, 0, 2, 2));                                       wait_idle();
    issue(0, cmdw(HALF, 2, 2, 0, 0, 2));                                         wait_idle();
    get(1, xa); get(2, ya); get(3, za);
    check_point(xa, ya, za, x3, y3, p, rinv, "point addition");

    // ---- point doubling of the sum, words: 0 p, 1-3 point, 4 aR, 5 3R,
    //      6 4R, 7 8R, 8 2R, 9-15 temporaries
    lam = mulm(addm(mulm(3, mulm(x3, x3, p), p), a, p), invm(mulm(2, y3, p), p), p);
    xd  = subm(mulm(lam, lam, p), mulm(2, x3, p), p);
    yd  = subm(mulm(lam, subm(x3, xd, p), p), y3, p);
    put(4, mulm(a, R, p)); put(5, mulm(3, R, p)); put(6, mulm(4, R, p));
    put(7, mulm(8, R, p)); put(8, mulm(2, R, p));
    issue(1, cmdw(MUL, 1, 1, 0, 0, 9));   issue(2, cmdw(MUL, 3, 3, 0, 0, 10));   wait_idle();
    issue(1, cmdw(MUL, 9, 5, 0, 0, 9));   issue(2, cmdw(MUL, 10, 10, 0, 0, 10)); wait_idle();
    issue(1, cmdw(MUL, 2, 2, 0, 0, 11));  issue(2, cmdw(MUL, 10, 4, 0, 0, 10));  wait_idle();
    issue(1, cmdw(MUL, 1, 11, 0, 0, 12)); issue(2, cmdw(MUL, 11, 11, 0, 0, 11));
    issue(0, cmdw(ADD, 9, 10, 0, 0, 13));                                        wait_idle();
    issue(1, cmdw(MUL, 12, 6, 0, 0, 12)); issue(2, cmdw(MUL, 11, 7, 0, 0, 11));  wait_idle();
    issue(1, cmdw(MUL, 2, 3, 0, 0, 14));  issue(2, cmdw(MUL, 13, 13, 0, 0, 9));  wait_idle();
    issue(1, cmdw(MUL, 14, 8, 0, 0, 3));
    issue(0, cmdw(ADD, 12, 12, 0, 0, 10));                                       wait_idle();
    issue(0, cmdw(SUB, 9, 10, 0, 0, 1, 4));                                      wait_idle();
    issue(0, cmdw(SUB, 12, 1, 0, 0, 15, 8));                                     wait_idle();
    issue(2, cmdw(MUL, 13, 15, 0, 0, 9));                                        wait_idle();
    issue(0, cmdw(SUB, 9, 11, 0, 0, 2, 2));                                      wait_idle();
    get(1, xa); get(2, ya); get(3, za);
    check_point(xa, ya, za, xd, yd, p, rinv, "point doubling");

    // ================================================ RSA, 256-bit modulus
    le = 64;
    bus_write(16'h0000, 32'(le));
    n   = rnd(256) | 1; n[255] = 1'b1;
    msg = rnd(250) % n;
    e   = 65537;
    Rm  = (wide_t'(1) << (4 * le + 4)) % n;
    c_ref = powm(msg, e, n);
    bus_write(16'h0001, 32'd17);
    put(0, n); put(1, msg); put(2, e); put(3, mulm(Rm, Rm, n)); put(4, msg); put(5, msg);
    issue(1, cmdw(EXP, 1, 2, 3, 0, 6));
    issue(2, cmdw(MUL, 4, 5, 0, 0, 7));
    // The second unit is now busy: a further command to it must be dropped.
    issue(2, cmdw(MUL, 4, 5, 0, 0, 8));
    bus_read(16'h0002, s);
    check(s[16] == 1'b1, "command to a busy unit flagged");
    if (s[16]) n_drop++;
    bus_write(16'h0002, 32'h0);
    wait_idle();
    get(6, v);
    check(v == c_ref, "RSA exponentiation");
    get(7, v);
    check(mulm(v, Rm, n) == mulm(msg, msg, n), "multiplication beside exponentiation");

    // ================================================ CRT, Garner variant
    le = 32;                                   // N = p*q has 128 bits
    bus_write(16'h0000, 32'(le));
    R  = wide_t'(1) << (4 * le + 4);
    pp = rnd(64) | 1; pp[63] = 1'b1;
    do begin
      qq = rnd(64) | 1; qq[63] = 1'b1;
    end while (qq >= pp || invm(qq, pp) == 0 || mulm(invm(qq, pp), qq, pp) != 1);
    nn = pp * qq;
    d  = rnd(128) % nn; d[127] = 1'b1;
    cc = rnd(126) % nn;
    m_ref = powm(cc, d, nn);
    u  = invm(qq, pp);                         // q^-1 mod p
    bus_write(16'h0001, 32'd128);
    put(0, pp); put(1, qq); put(2, nn); put(3, cc % pp); put(4, cc % qq); put(5, d);
    put(6, mulm(R % pp, R % pp, pp)); put(7, mulm(R % qq, R % qq, qq));
    put(8, mulm(u, mulm(R % pp, R % pp, pp), pp));
    put(9, mulm(qq, mulm(R % nn, R % nn, nn), nn));
    put(10, mulm(R % nn, R % nn, nn)); put(15, 1);
    issue(1, cmdw(EXP, 3, 5, 6, 0, 11));       // s = C1^d mod p
    issue(2, cmdw(EXP, 4, 5, 7, 1, 12));       // t = C2^d mod q
    wait_idle();
    issue(0, cmdw(SUB, 11, 12, 0, 0, 13, 1));  // x = s + p - t
    wait_idle();
    get(13, v);
    check(v < 2 * pp, "x = s + p - t below 2p");
    issue(1, cmdw(MUL, 13, 8, 0, 0, 14));      // x*U in Montgomery form
    wait_idle();
    issue(1, cmdw(MUL, 14, 15, 0, 0, 14));     // h = x*U mod p
    wait_idle();
    issue(1, cmdw(MUL, 14, 9, 0, 2, 3));       // q*h*R mod N
    issue(2, cmdw(MUL, 12, 10, 0, 2, 4));      // t*R mod N
    wait_idle();
    issue(0, cmdw(ADD, 3, 4, 0, 2, 5));
    wait_idle();
    issue(1, cmdw(MUL, 5, 15, 0, 2, 6));       // back to normal form
    wait_idle();
    get(6, v);
    check(v == m_ref, "CRT decryption");

    // ================================================ mechanisms
    check(n_both_mmm > 0, "two multipliers busy at once");
    check(n_mmm_lncp > 0, "multiplier and LNCP busy at once");
    check(n_mul > 0 && n_exp > 0, "MUL and EXP commands");
    check(n_add > 0 && n_sub > 0 && n_half > 0, "ADD, SUB and HALF commands");
    check(n_mx > 0, "multiply steps inside an exponentiation");
    check(n_len_switch >= 2, "operand length switches");
    check(n_drop > 0, "dropped command");
    $display("mechanisms: both_mmm=%0d mmm_lncp=%0d mul=%0d exp=%0d add=%0d sub=%0d half=%0d mx=%0d len_switch=%0d drop=%0d",
             n_both_mmm, n_mmm_lncp, n_mul, n_exp, n_add, n_sub, n_half, n_mx, n_len_switch, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
