// lncp: Large Number Co-Processor, the adder/subtracter beside the Montgomery
// units.
//
// It performs the additions and subtractions of elliptic-curve point
// arithmetic and of the CRT recombination without any modular reduction, so
// every operation takes the same time whatever the data:
//
//   LOP_ADD   d = a + b
//   LOP_SUB   d = a + k*m - b        (k = 2 for two multiplier outputs below
//                                     2m; k = 1 for the CRT step s + p - t)
//   LOP_HALF  d = (a + (a odd ? m : 0)) / 2   (halving mod m, odd m)
//
// The host chooses k so that the result is not negative; values stay
// congruent mod m and are fed to the Montgomery units, which accept inputs up
// to 2^(4*len+4). A result wider than the operand word wraps.
//
// Interface and timing: a command is accepted when busy is low. The unit
// reads m, a and b through its read port in three cycles, computes in the
// fourth and writes d in the fifth, the cycle done is high. Memory read data
// must be valid in the cycle rd_addr is driven.
//
// From the source design: non-modular a + b and a + 2p - b, and s + p - t for
// CRT. Own choices: the general k*m term (needed for 2*X3 and similar terms of
// the point formulas), the halving operation used for the /2 of the point
// addition, and the command format.
module lncp
  import rsa_ecc_pkg::*;
#(
  parameter int unsigned N_MAX = 4096,
  localparam int unsigned L   = N_MAX / DIGIT,
  localparam int unsigned OPW = DIGIT * (L + 2)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cmd_valid,
  input  cmd_t           cmd,
  output logic           busy,
  output logic           done,
  output logic [AW-1:0]  rd_addr,
  input  logic [OPW-1:0] rd_data,
  output logic           wr_en,
  output logic [AW-1:0]  wr_addr,
  output logic [OPW-1:0] wr_data
);

  typedef enum logic [2:0] {S_IDLE, S_LDM, S_LDA, S_LDB, S_EXEC, S_STORE} state_e;

  state_e         state;
  cmd_t           cmd_q;
  logic [OPW-1:0] mreg, areg, breg, res;
  logic [OPW+4:0] kp, sum;

  assign busy    = (state != S_IDLE);
  assign done    = (state == S_STORE);
  assign wr_en   = (state == S_STORE);
  assign wr_addr = cmd_q.d;
  assign wr_data = res;

  always_comb begin
    case (state)
      S_LDM:   rd_addr = cmd_q.m;
      S_LDA:   rd_addr = cmd_q.a;
      default: rd_addr = cmd_q.b;
    endcase
  end

  always_comb begin
    kp = (OPW+5)'(mreg) * (OPW+5)'(cmd_q.k);
    case (lncp_op_e'(cmd_q.op))
      LOP_ADD:  sum = (OPW+5)'(areg) + (OPW+5)'(breg);
      LOP_SUB:  sum = (OPW+5)'(areg) + kp - (OPW+5)'(breg);
      LOP_HALF: sum = ((OPW+5)'(areg) + (areg[0] ? (OPW+5)'(mreg) : '0)) >> 1;
      default:  sum = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cmd_q <= '0;
      mreg  <= '0;
      areg  <= '0;
      breg  <= '0;
      res   <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (cmd_valid) begin
          cmd_q <= cmd;
          state <= S_LDM;
        end
        S_LDM:   begin mreg <= rd_data; state <= S_LDA;   end
        S_LDA:   begin areg <= rd_data; state <= S_LDB;   end
        S_LDB:   begin breg <= rd_data; state <= S_EXEC;  end
        S_EXEC:  begin res  <= sum[OPW-1:0]; state <= S_STORE; end
        S_STORE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cmd_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> !busy)
    else $error("lncp: command while busy");

endmodule
