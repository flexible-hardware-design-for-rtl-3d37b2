// tb_mmme: self-checking test of the Montgomery multiplication /
// exponentiation unit on a 64-bit array.
//
// A behavioural memory in the testbench serves the unit's ports. Random
// MOP_MUL commands are checked for d*R == a*b (mod m) and d < 2m; random
// MOP_EXP commands (exponents up to 64 bits, operand lengths 2..16 digits)
// are checked against a^b mod m from wide integer arithmetic. The run time
// of each command is checked against 5 + K*(3*len+8) cycles, K being the
// number of multiplications (3 + exponent bits + one bits for MOP_EXP):
// squarings and multiplications cost the same.
module tb_mmme;
  import rsa_ecc_pkg::*;

  localparam int unsigned N_MAX = 64;
  localparam int unsigned L     = N_MAX / DIGIT;
  localparam int unsigned OPW   = DIGIT * (L + 2);
  localparam int unsigned LENW  = $clog2(L + 1);
  localparam int unsigned EBW   = $clog2(N_MAX + 1);
  localparam int unsigned RW    = 3 * OPW;

  logic clk = 1'b0, rst_n = 1'b0, cmd_valid = 1'b0;
  cmd_t cmd;
  logic [LENW-1:0] len;
  logic [EBW-1:0]  ebits;
  logic busy, done, wr_en;
  logic [AW-1:0]  rd_addr, wr_addr;
  logic [OPW-1:0] rd_data, wr_data;
  logic [OPW-1:0] mem [NWORDS];
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign rd_data = mem[rd_addr];
  always @(posedge clk) if (wr_en) mem[wr_addr] <= wr_data;

  mmme #(.N_MAX(N_MAX)) dut (.*);

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OPW-1:0] rnd(input int bits);
    logic [OPW-1:0] v = '0;
    for (int i = 0; i < OPW; i += 32) v[i +: 32] = $urandom;
    return v & ((OPW'(1) << bits) - 1);
  endfunction

  function automatic logic [RW-1:0] modexp(input logic [RW-1:0] b, e, m, input int nb);
    logic [RW-1:0] r = 1 % m;
    for (int i = nb - 1; i >= 0; i--) begin
      r = (r * r) % m;
      if (e[i]) r = (r * b) % m;
    end
    return r;
  endfunction

  task automatic run(input mmme_op_e op, input int l, input int eb, input int k);
    longint t0;
    int want;
    @(negedge clk);
    cmd = '0;
    cmd.op = op; cmd.a = 1; cmd.b = 2; cmd.c = 3; cmd.m = 4; cmd.d = 5;
    len = LENW'(l); ebits = EBW'(eb);
    cmd_valid = 1'b1;
    @(negedge clk); cmd_valid = 1'b0; t0 = cyc;
    while (!done) @(negedge clk);
    @(negedge clk);
    want = 5 + k * (3 * l + 8);
    checks++;
    if (int'(cyc - t0) != want) begin
      failures++;
      $display("FAIL time op=%0d l=%0d: %0d cycles, want %0d", op, l, cyc - t0, want);
    end
  endtask

  initial begin
    logic [OPW-1:0] n, a, b, e;
    logic [RW-1:0] r, r2, ref_v;
    int l, eb, ones;
    cmd = '0; len = '0; ebits = '0;
    for (int w = 0; w < NWORDS; w++) mem[w] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 30; it++) begin
      l = 1 + $urandom % L;
      n = rnd(4 * l) | 1;
      a = rnd(4 * l + 2) % (4 * n);
      b = rnd(4 * l + 2) % (4 * n);
      mem[1] = a; mem[2] = b; mem[4] = n;
      run(MOP_MUL, l, 0, 1);
      checks++;
      if (((RW'(mem[5]) << (4 * l + 4)) % RW'(n)) != (RW'(a) * RW'(b)) % RW'(n) ||
          RW'(mem[5]) >= 2 * RW'(n)) begin
        failures++;
        $display("FAIL mul l=%0d a=%h b=%h n=%h got %h", l, a, b, n, mem[5]);
      end
    end
    for (int it = 0; it < 30; it++) begin
      l  = 2 + $urandom % (L - 1);
      n  = rnd(4 * l) | 1;
      n[4 * l - 1] = 1'b1;
      a  = rnd(4 * l) % n;
      eb = (it == 0) ? 0 : 1 + int'($urandom % (4 * l));
      e  = rnd(eb);
      if (eb > 0) e[eb - 1] = 1'b1;
      ones = $countones(e);
      r  = RW'(1) << (4 * l + 4);
      r2 = (r * r) % RW'(n);
      mem[1] = a; mem[2] = e; mem[3] = r2[OPW-1:0]; mem[4] = n;
      run(MOP_EXP, l, eb, 3 + eb + ones);
      ref_v = modexp(RW'(a), RW'(e), RW'(n), eb);
      checks++;
      if (RW'(mem[5]) != ref_v) begin
        failures++;
        $display("FAIL exp l=%0d eb=%0d a=%h e=%h n=%h got %h want %h", l, eb, a, e, n,
                 mem[5], ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
