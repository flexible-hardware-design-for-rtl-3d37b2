// tb_mmm_rightmost_cell: self-checking test of the rightmost processing cell.
//
// For every odd n0 and random x, y0, t_in it checks that the quotient digit m
// makes t_in + x*y0 + m*n0 divisible by 16 (found by searching all 16
// candidates, not by the cell's formula), that the carry is that sum over 16,
// that x is passed on and that outputs hold while v_in is low.
module tb_mmm_rightmost_cell;
  import rsa_ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, v_in = 1'b0;
  logic [DIGIT-1:0] x_in, y0, n0, ninv, t_in, x_out, m_out;
  logic [CW-1:0] c_out;
  logic v_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mmm_rightmost_cell dut (.*);

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
      $display("FAIL %s: x=%0d y0=%0d n0=%0d t=%0d -> m=%0d c=%0d", what, x_in, y0, n0, t_in,
               m_out, c_out);
    end
  endtask

  initial begin
    int u, mexp, s;
    logic [CW-1:0] c_prev;
    {x_in, y0, n0, t_in} = '0;
    ninv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      n0   = 4'($urandom) | 4'd1;
      ninv = '0;
      for (int c = 0; c < 16; c++) if (((c * n0) % 16) == 15) ninv = 4'(c);
      x_in = 4'($urandom); y0 = 4'($urandom); t_in = 4'($urandom);
      v_in = 1'b1;
      u = int'(t_in) + int'(x_in) * int'(y0);
      mexp = -1;
      for (int c = 0; c < 16; c++) if (mexp < 0 && ((u + c * n0) % 16) == 0) mexp = c;
      s = u + mexp * int'(n0);
      @(negedge clk);
      check(int'(m_out) == mexp, "quotient digit");
      check(int'(c_out) == s / 16, "carry");
      check(x_out == x_in && v_out, "pass-through");
      check(neg_inv16(n0) == ninv, "package -n0^-1 mod 16");
      c_prev = c_out;
      v_in = 1'b0; t_in = 4'($urandom); x_in = 4'($urandom);
      @(negedge clk);
      check(c_out == c_prev && !v_out, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
