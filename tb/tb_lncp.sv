// tb_lncp: self-checking test of the large number co-processor.
//
// A behavioural memory in the testbench serves the unit's read and write
// ports. Random ADD, SUB (k = 0..15) and HALF commands on a 64-bit operand
// word are checked against wide integer arithmetic, including the
// constant five-cycle operation time.
module tb_lncp;
  import rsa_ecc_pkg::*;

  localparam int unsigned N_MAX = 64;
  localparam int unsigned OPW   = DIGIT * (N_MAX / DIGIT + 2);

  logic clk = 1'b0, rst_n = 1'b0, cmd_valid = 1'b0;
  cmd_t cmd;
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

  lncp #(.N_MAX(N_MAX)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OPW-1:0] rnd(input int bits);
    logic [OPW-1:0] v = '0;
    for (int i = 0; i < OPW; i += 32) v[i +: 32] = $urandom;
    return v & ((OPW'(1) << bits) - 1);
  endfunction

  initial begin
    logic [OPW+8:0] expv;
    logic [OPW-1:0] p, a, b;
    int op, k;
    longint t0;
    cmd = '0;
    for (int w = 0; w < NWORDS; w++) mem[w] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      p = rnd(N_MAX) | 1;
      a = rnd(N_MAX + 2) % (4 * p);
      b = rnd(N_MAX + 2) % (4 * p);
      op = $urandom % 3;
      k  = (op == 1) ? int'($urandom % 16) : 0;
      if (op == 1 && (OPW+9)'(a) + (OPW+9)'(k) * p < (OPW+9)'(b)) k = 4;
      mem[1] = p; mem[2] = a; mem[3] = b;
      case (op)
        0: expv = (OPW+9)'(a) + b;
        1: expv = (OPW+9)'(a) + (OPW+9)'(k) * p - b;
        default: expv = ((OPW+9)'(a) + (a[0] ? (OPW+9)'(p) : '0)) >> 1;
      endcase
      @(negedge clk);
      cmd.op = 2'(op); cmd.a = 2; cmd.b = 3; cmd.m = 1; cmd.d = 4'(5 + it % 8); cmd.k = 4'(k);
      cmd_valid = 1'b1;
      @(negedge clk); cmd_valid = 1'b0; t0 = cyc;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (mem[5 + it % 8] != expv[OPW-1:0]) begin
        failures++;
        $display("FAIL op=%0d k=%0d a=%h b=%h p=%h got %h want %h", op, k, a, b, p,
                 mem[5 + it % 8], expv[OPW-1:0]);
      end
      checks++;
      if (cyc - t0 != 5) begin  // four cycles after acceptance, then the write edge
        failures++;
        $display("FAIL op time %0d", cyc - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
