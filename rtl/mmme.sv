// mmme: Montgomery multiplication / exponentiation unit (MMM/E).
//
// Wraps one systolic multiplier (mmm) with the sequencing needed for RSA.
// A command names words of the shared operand memory; the unit first copies
// the modulus m and the operands a, b, c into its own registers (one word per
// cycle through its read port), runs, and writes one result word to d.
//
//   MOP_MUL  d = Mont(a, b) = a*b*R^-1 mod m (result < 2m for a, b < 4m)
//   MOP_EXP  d = a^b mod m, with c = R^2 mod m supplied by the host:
//              xm  = Mont(a, R^2)          base into Montgomery form
//              acc = Mont(R^2, 1) = R mod m
//              for i = ebits-1 downto 0:   left-to-right binary method
//                acc = Mont(acc, acc)
//                if b[i]: acc = Mont(acc, xm)
//              d   = Mont(acc, 1)          back to normal form, d <= m
//
// R = 2^(4*len+4). No intermediate result is ever reduced: the R > 16N bound
// keeps every value below 2m. Squarings and multiplications use the same
// array and take the same 3*len+7 cycles.
//
// Interface: cmd_valid/cmd accepted when busy is low; len and ebits are
// sampled with the command. done pulses for one cycle in the cycle the result
// is written (wr_en). Memory read data must be valid in the cycle rd_addr is
// driven (combinational read).
//
// From the source design: Montgomery form via R^2 mod N, conversion back by
// multiplication with 1, no reductions, square and multiply on one array.
// Own choices: the command format, the load/store sequence, the exponent
// length register and the left-to-right scan order.
module mmme
  import rsa_ecc_pkg::*;
#(
  parameter int unsigned N_MAX = 4096,
  localparam int unsigned L    = N_MAX / DIGIT,
  localparam int unsigned OPW  = DIGIT * (L + 2),
  localparam int unsigned LENW = $clog2(L + 1),
  localparam int unsigned EBW  = $clog2(N_MAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  input  cmd_t            cmd,
  input  logic [LENW-1:0] len,
  input  logic [EBW-1:0]  ebits,
  output logic            busy,
  output logic            done,
  output logic [AW-1:0]   rd_addr,
  input  logic [OPW-1:0]  rd_data,
  output logic            wr_en,
  output logic [AW-1:0]   wr_addr,
  output logic [OPW-1:0]  wr_data
);

  typedef enum logic [1:0] {PH_IDLE, PH_LOAD, PH_RUN, PH_STORE} phase_e;
  typedef enum logic [2:0] {ST_MUL, ST_TOM, ST_ONE, ST_SQ, ST_MX, ST_FROM} step_e;

  phase_e          phase;
  step_e           step;
  cmd_t            cmd_q;
  logic [LENW-1:0] len_q;
  logic [EBW-1:0]  ebits_q, bitidx;
  logic [1:0]      lidx;
  logic [OPW-1:0]  nreg, areg, breg, creg, xm, acc, res;
  logic            mm_start, mm_busy, mm_done;
  logic [OPW-1:0]  mm_x, mm_y, mm_t;

  assign busy    = (phase != PH_IDLE);
  assign done    = (phase == PH_STORE);
  assign wr_en   = (phase == PH_STORE);
  assign wr_addr = cmd_q.d;
  assign wr_data = res;

  always_comb begin
    case (lidx)
      2'd0:    rd_addr = cmd_q.m;
      2'd1:    rd_addr = cmd_q.a;
      2'd2:    rd_addr = cmd_q.b;
      default: rd_addr = cmd_q.c;
    endcase
  end

  always_comb begin
    case (step)
      ST_MUL:  begin mm_x = areg; mm_y = breg;        end
      ST_TOM:  begin mm_x = areg; mm_y = creg;        end
      ST_ONE:  begin mm_x = creg; mm_y = OPW'(1);     end
      ST_SQ:   begin mm_x = acc;  mm_y = acc;         end
      ST_MX:   begin mm_x = acc;  mm_y = xm;          end
      default: begin mm_x = acc;  mm_y = OPW'(1);     end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      step     <= ST_MUL;
      cmd_q    <= '0;
      len_q    <= '0;
      ebits_q  <= '0;
      bitidx   <= '0;
      lidx     <= '0;
      nreg     <= '0;
      areg     <= '0;
      breg     <= '0;
      creg     <= '0;
      xm       <= '0;
      acc      <= '0;
      res      <= '0;
      mm_start <= 1'b0;
    end else begin
      mm_start <= 1'b0;
      unique case (phase)
        PH_IDLE: if (cmd_valid) begin
          cmd_q   <= cmd;
          len_q   <= len;
          ebits_q <= ebits;
          lidx    <= '0;
          phase   <= PH_LOAD;
        end
        PH_LOAD: begin
          case (lidx)
            2'd0:    nreg <= rd_data;
            2'd1:    areg <= rd_data;
            2'd2:    breg <= rd_data;
            default: creg <= rd_data;
          endcase
          lidx <= lidx + 1'b1;
          if (lidx == 2'd3) begin
            phase    <= PH_RUN;
            step     <= (cmd_q.op == MOP_EXP) ? ST_TOM : ST_MUL;
            mm_start <= 1'b1;
          end
        end
        PH_RUN: if (mm_done) begin
          unique case (step)
            ST_MUL: begin
              res   <= mm_t;
              phase <= PH_STORE;
            end
            ST_TOM: begin
              xm       <= mm_t;
              step     <= ST_ONE;
              mm_start <= 1'b1;
            end
            ST_ONE: begin
              acc      <= mm_t;
              bitidx   <= ebits_q - 1'b1;
              step     <= (ebits_q == '0) ? ST_FROM : ST_SQ;
              mm_start <= 1'b1;
            end
            ST_SQ: begin
              acc      <= mm_t;
              mm_start <= 1'b1;
              if (breg[bitidx]) begin
                step <= ST_MX;
              end else if (bitidx == '0) begin
                step <= ST_FROM;
              end else begin
                bitidx <= bitidx - 1'b1;
              end
            end
            ST_MX: begin
              acc      <= mm_t;
              mm_start <= 1'b1;
              if (bitidx == '0) begin
                step <= ST_FROM;
              end else begin
                bitidx <= bitidx - 1'b1;
                step   <= ST_SQ;
              end
            end
            ST_FROM: begin
              res   <= mm_t;
              phase <= PH_STORE;
            end
            default: ;
          endcase
        end
        PH_STORE: phase <= PH_IDLE;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  mmm #(.N_MAX(N_MAX)) u_mmm (
    .clk, .rst_n,
    .start(mm_start),
    .len  (len_q),
    .x    (mm_x),
    .y    (mm_y),
    .n    (nreg),
    .busy (mm_busy),
    .done (mm_done),
    .t    (mm_t)
  );

  a_cmd_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> !busy)
    else $error("mmme: command while busy");
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) mm_start |-> !mm_busy)
    else $error("mmme: multiplier restarted while busy");

endmodule
