// mmm_cell: regular processing cell of the systolic Montgomery multiplier.
//
// Cell j holds digit y_j of the multiplier and n_j of the modulus. When the
// digit pair (x_i, m_i) reaches it, it adds
//   t_in + x_i*y_j + m_i*n_j + c_in
// where t_in is digit j of the previous partial result (coming from the left
// neighbour, cell j+1) and c_in the carry of cell j-1 in the same step. The
// low 4 bits of the sum are digit j-1 of the new partial result, which moves
// one cell to the right; the upper bits are the carry to cell j+1. This is
// Eq. (5) of the source generalised to alpha = beta = 4.
//
// Timing: outputs are registered and update only in a cycle where v_in is
// high; x, m and valid travel one cell left per cycle. clr zeroes the partial
// result digit, the carry and the valid flag.
//
// From the source design: the cell equation and digit sizes. Own choice: the
// source's two carry bits C0/C1 become one 5-bit carry, since with 4-bit
// digits the carry reaches 31. The 1st-digit, regular and leftmost cells of
// Fig. 1 are all this module, the leftmost ones with y_j = n_j = 0.
module mmm_cell
  import rsa_ecc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             v_in,
  input  logic [DIGIT-1:0] x_in,
  input  logic [DIGIT-1:0] m_in,
  input  logic [CW-1:0]    c_in,
  input  logic [DIGIT-1:0] t_in,
  input  logic [DIGIT-1:0] y_j,
  input  logic [DIGIT-1:0] n_j,
  output logic             v_out,
  output logic [DIGIT-1:0] x_out,
  output logic [DIGIT-1:0] m_out,
  output logic [CW-1:0]    c_out,
  output logic [DIGIT-1:0] t_out
);

  logic [DIGIT+CW-1:0] s;

  always_comb begin
    s = (DIGIT+CW)'(t_in) + (DIGIT+CW)'(x_in) * (DIGIT+CW)'(y_j)
      + (DIGIT+CW)'(m_in) * (DIGIT+CW)'(n_j) + (DIGIT+CW)'(c_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out <= 1'b0;
      x_out <= '0;
      m_out <= '0;
      c_out <= '0;
      t_out <= '0;
    end else if (clr) begin
      v_out <= 1'b0;
      x_out <= '0;
      m_out <= '0;
      c_out <= '0;
      t_out <= '0;
    end else begin
      v_out <= v_in;
      if (v_in) begin
        x_out <= x_in;
        m_out <= m_in;
        c_out <= s[DIGIT+CW-1:DIGIT];
        t_out <= s[DIGIT-1:0];
      end
    end
  end

endmodule
