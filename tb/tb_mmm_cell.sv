// tb_mmm_cell: self-checking test of the regular processing cell.
//
// Drives random digits and carries, including the all-ones extremes, and
// checks the registered sum digit and carry against
// 16*c_out + t_out = t_in + x*y + m*n + c_in, that x and m are passed on,
// that the outputs hold while v_in is low and that clr zeroes them.
module tb_mmm_cell;
  import rsa_ecc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, v_in = 1'b0;
  logic [DIGIT-1:0] x_in, m_in, t_in, y_j, n_j, x_out, m_out, t_out;
  logic [CW-1:0] c_in, c_out;
  logic v_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mmm_cell dut (.*);

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
      $display("FAIL %s: x=%0d m=%0d t=%0d y=%0d n=%0d c=%0d -> t=%0d c=%0d", what,
               x_in, m_in, t_in, y_j, n_j, c_in, t_out, c_out);
    end
  endtask

  initial begin
    int s;
    logic [DIGIT-1:0] t_prev;
    logic [CW-1:0]    c_prev;
    {x_in, m_in, t_in, y_j, n_j, c_in} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (k < 16) begin
        x_in = 15; m_in = 15; t_in = 15; y_j = 15; n_j = 15; c_in = 5'(31 - k);
      end else begin
        x_in = 4'($urandom); m_in = 4'($urandom); t_in = 4'($urandom);
        y_j  = 4'($urandom); n_j  = 4'($urandom); c_in = 5'($urandom);
      end
      v_in = 1'b1;
      s = int'(t_in) + int'(x_in) * int'(y_j) + int'(m_in) * int'(n_j) + int'(c_in);
      @(negedge clk);
      check(int'(t_out) == s % 16, "digit");
      check(int'(c_out) == s / 16, "carry");
      check(x_out == x_in && m_out == m_in && v_out, "pass-through");
      // Outputs hold while v_in is low.
      t_prev = t_out; c_prev = c_out;
      v_in = 1'b0; x_in = 4'($urandom); c_in = 5'($urandom);
      @(negedge clk);
      check(t_out == t_prev && c_out == c_prev && !v_out, "hold");
    end
    clr = 1'b1; v_in = 1'b1;
    @(negedge clk);
    clr = 1'b0; v_in = 1'b0;
    check(t_out == 0 && c_out == 0 && !v_out, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
