// mdbl_fsm: sub-state machine for Montgomery point doubling.
//
// Doubles the ladder point (X : Z) in place:
//     X' = X^4 + b*Z^4
//     Z' = X^2 * Z^2
// that is 2 multiplications, 4 squarings and 1 addition. X and Z are reached
// through parameter addresses 0 and 1, which the main state machine set to
// the ladder point chosen by the key bit; b is read from its fixed location.
//
// Schedule (cycle after go = D0):
//   D0  read Z, b
//   D1  Z^2, Z^4 with the two chained squarers; mul0 <- b*Z^4;
//       Z^2 loaded into mul1's a register; read X
//   D2  X^2, X^4; mul1 <- Z^2*X^2; X^4 stored in a temporary
//   D3  wait for both products, reading the temporary back, then in the
//       cycle they are ready:
//   D4  X <- X^4 + mul0, Z <- mul1, done
// The doubling takes 7 cycles from go to done. The schedule is this design's
// choice; the formula and its cost follow the design.
module mdbl_fsm
  import ecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  go,
  input  logic  mul0_ready,
  input  logic  mul1_ready,
  output ctrl_t ctrl,
  output logic  active,
  output logic  done
);
  typedef enum logic [2:0] {IDLE, D0, D1, D2, D3} state_e;
  state_e state, nxt;

  always_comb begin
    nxt  = state;
    ctrl = CTRL_IDLE;
    done = 1'b0;
    unique case (state)
      IDLE: if (go) nxt = D0;
      D0: begin
        ctrl.pa = rd_par(2'd1);          // Z
        ctrl.pb = rd_dir(A_B);           // b
        nxt = D1;
      end
      D1: begin
        ctrl.sqr0_src = SRC_RDA;         // Z^2
        ctrl.sqr1_src = SRC_SQR0;        // Z^4
        ctrl.m0       = mul_go(SRC_SQR1, SRC_RDB);
        ctrl.m1.la    = 1'b1;
        ctrl.m1.asrc  = SRC_SQR0;
        ctrl.pa       = rd_par(2'd0);    // X
        nxt = D2;
      end
      D2: begin
        ctrl.sqr0_src = SRC_RDA;         // X^2
        ctrl.sqr1_src = SRC_SQR0;        // X^4
        ctrl.m1.start = 1'b1;
        ctrl.m1.lb    = 1'b1;
        ctrl.m1.bsrc  = SRC_SQR0;
        ctrl.pb       = wr_dir(A_T0, SRC_SQR1);
        nxt = D3;
      end
      D3: begin
        if (mul0_ready && mul1_ready) begin   // step D4
          ctrl.add0_a = SRC_RDA;
          ctrl.add0_b = SRC_MUL0;
          ctrl.pa     = wr_par(2'd0, SRC_ADD0);
          ctrl.pb     = wr_par(2'd1, SRC_MUL1);
          done = 1'b1;
          nxt  = IDLE;
        end else begin
          ctrl.pa = rd_dir(A_T0);
        end
      end
      default: nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= IDLE;
    else        state <= nxt;

  assign active = (state != IDLE);
endmodule
