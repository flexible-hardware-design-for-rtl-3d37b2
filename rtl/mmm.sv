// mmm: systolic Montgomery modular multiplier, T = X*Y*R^-1 mod N.
//
// The array is one rightmost cell followed by L+2 regular cells (L = N_MAX/4
// radix-16 digits). The multiplier Y and the modulus N stay in place, one
// digit per cell; the multiplicand X enters the rightmost cell one digit every
// second cycle. Each digit x_i, with its quotient digit m_i, then walks left
// one cell per cycle while the partial result walks right, so cell j handles
// step i in cycle 2i+j. A step computes T = (T + x_i*Y + m_i*N)/16; after
// l+1 steps (l = len, the operand length in digits) the array holds
// T = X*Y*R^-1 mod N with R = 2^(4(l+1)) = 2^(n+4), the bound R > 16N of the
// source design. Inputs X, Y < 4N then give T < 2N, so results can be fed
// back (or added/subtracted without reduction) with no final subtraction.
// Because cells beyond l+2 only see zeros, one array serves every operand
// length up to N_MAX bits; the clock period does not depend on the length.
//
// Interface: pulse start with len (1..L), x, y, n (n odd, n < 2^(4*len),
// x and y < 2^(4*len+4)). x, y, n are captured at start. done is high for
// one cycle exactly 3*len+7 cycles after the start cycle, the cycle count the
// source gives for this multiplier; the array itself finishes after 3*len+3
// cycles and t stays valid from done until the next start. start while busy
// is not allowed.
//
// From the source design: cell structure, digit size, R > 16N, cycle count.
// Own choices: the operand length is a run-time input, done is a fixed-
// latency pulse, and -n_0^-1 mod 16 is computed here from n.
module mmm
  import rsa_ecc_pkg::*;
#(
  parameter int unsigned N_MAX = 4096,
  localparam int unsigned L   = N_MAX / DIGIT,
  localparam int unsigned OPW = DIGIT * (L + 2),
  localparam int unsigned LENW = $clog2(L + 1),
  localparam int unsigned CNTW = $clog2(3 * L + 8)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [LENW-1:0] len,
  input  logic [OPW-1:0]  x,
  input  logic [OPW-1:0]  y,
  input  logic [OPW-1:0]  n,
  output logic            busy,
  output logic            done,
  output logic [OPW-1:0]  t
);

  logic [OPW-1:0]   xsh, yreg, nreg;
  logic [LENW-1:0]  lreg;
  logic [CNTW-1:0]  cnt;
  logic             feed;
  logic [CNTW-1:0]  last_feed, done_cnt;

  assign last_feed = CNTW'(2 * lreg);
  assign done_cnt  = CNTW'(3 * lreg + 6);
  assign feed      = busy && !cnt[0] && (cnt <= last_feed);
  assign done      = busy && (cnt == done_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      lreg <= '0;
      xsh  <= '0;
      yreg <= '0;
      nreg <= '0;
    end else if (start) begin
      busy <= 1'b1;
      cnt  <= '0;
      lreg <= len;
      xsh  <= x;
      yreg <= y;
      nreg <= n;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
      if (feed) xsh <= xsh >> DIGIT;
      if (done) busy <= 1'b0;
    end
  end

  // Cell chain. Index j = 0 is the rightmost cell, j = L+2 the leftmost.
  logic             v   [L+3];
  logic [DIGIT-1:0] xd  [L+3];
  logic [DIGIT-1:0] md  [L+3];
  logic [CW-1:0]    cd  [L+3];
  logic [DIGIT-1:0] td  [L+4];   // td[j]: partial result digit leaving cell j
  logic [DIGIT-1:0] ninv;

  assign ninv    = neg_inv16(nreg[DIGIT-1:0]);
  assign td[L+3] = '0;            // nothing enters the leftmost cell from the left
  assign td[0]   = '0;            // unused: the rightmost cell's digit is always zero

  mmm_rightmost_cell u_cell0 (
    .clk, .rst_n, .clr(start),
    .v_in (feed),
    .x_in (xsh[DIGIT-1:0]),
    .y0   (yreg[DIGIT-1:0]),
    .n0   (nreg[DIGIT-1:0]),
    .ninv (ninv),
    .t_in (td[1]),
    .v_out(v[0]),
    .x_out(xd[0]),
    .m_out(md[0]),
    .c_out(cd[0])
  );

  for (genvar j = 1; j <= L + 2; j++) begin : g_cell
    logic [DIGIT-1:0] yj, nj;
    if (j <= L + 1) begin : g_op
      assign yj = yreg[DIGIT*j +: DIGIT];
      assign nj = nreg[DIGIT*j +: DIGIT];
    end else begin : g_top
      assign yj = '0;
      assign nj = '0;
    end
    mmm_cell u_cell (
      .clk, .rst_n, .clr(start),
      .v_in (v[j-1]),
      .x_in (xd[j-1]),
      .m_in (md[j-1]),
      .c_in (cd[j-1]),
      .t_in (td[j+1]),
      .y_j  (yj),
      .n_j  (nj),
      .v_out(v[j]),
      .x_out(xd[j]),
      .m_out(md[j]),
      .c_out(cd[j]),
      .t_out(td[j])
    );
    // Digit j-1 of the result leaves cell j.
    assign t[DIGIT*(j-1) +: DIGIT] = td[j];
  end

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("mmm: start while busy");

endmodule
