// mmm_rightmost_cell: rightmost processing cell of the systolic Montgomery
// multiplier.
//
// For each radix-16 digit x_i of the multiplicand entering the array it forms
// u = t_in + x_i*y_0, chooses the Montgomery quotient digit
// m_i = u * (-n_0^-1) mod 16 so that u + m_i*n_0 is a multiple of 16, and
// passes x_i, m_i and the carry (u + m_i*n_0)/16 to the next cell. Its own sum
// digit is always zero and is dropped: this is the division by 2^alpha of
// each Montgomery step.
//
// Timing: all outputs are registered and change only in a cycle where v_in is
// high; v_out follows v_in one cycle later. clr (synchronous) zeroes the
// carry and the valid flag before a new multiplication.
//
// From the source design: the cell's place and its outputs x_i, m_i, C0/C1
// (Fig. 1), alpha = beta = 4. Own choices: the two carry lines are merged into
// one 5-bit carry, and -n_0^-1 mod 16 is supplied as an input (computed once
// per multiplication by the multiplier).
module mmm_rightmost_cell
  import rsa_ecc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             v_in,
  input  logic [DIGIT-1:0] x_in,
  input  logic [DIGIT-1:0] y0,
  input  logic [DIGIT-1:0] n0,
  input  logic [DIGIT-1:0] ninv,   // -n0^-1 mod 16
  input  logic [DIGIT-1:0] t_in,   // digit 0 of the previous partial result
  output logic             v_out,
  output logic [DIGIT-1:0] x_out,
  output logic [DIGIT-1:0] m_out,
  output logic [CW-1:0]    c_out
);

  logic [7:0]       u;
  logic [7:0]       mprod;
  logic [DIGIT-1:0] m;
  logic [8:0]       s;

  always_comb begin
    u     = 8'(t_in) + 8'(x_in) * 8'(y0);
    mprod = 8'(u[DIGIT-1:0]) * 8'(ninv);
    m     = mprod[DIGIT-1:0];
    s     = 9'(u) + 9'(m) * 9'(n0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out <= 1'b0;
      x_out <= '0;
      m_out <= '0;
      c_out <= '0;
    end else if (clr) begin
      v_out <= 1'b0;
      x_out <= '0;
      m_out <= '0;
      c_out <= '0;
    end else begin
      v_out <= v_in;
      if (v_in) begin
        x_out <= x_in;
        m_out <= m;
        c_out <= s[DIGIT+CW-1:DIGIT];
      end
    end
  end

endmodule
