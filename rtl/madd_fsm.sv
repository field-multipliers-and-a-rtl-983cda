// madd_fsm: sub-state machine for Montgomery point addition.
//
// Computes, in projective x-only (X : Z) coordinates, the sum of the two
// ladder points Pa = (Xa : Za) and Pb = (Xb : Zb), whose difference is the
// base point P with affine x-coordinate x, and writes it over Pa:
//     Z3 = (Xa*Zb + Xb*Za)^2
//     X3 = x*Z3 + (Xa*Zb)*(Xb*Za)
// that is 4 multiplications, 1 squaring and 2 additions. The machine never
// names the ladder points itself: it reads and writes them through the
// parameter addresses 0..3 = Xa, Za, Xb, Zb that the main state machine set
// up before the trigger, so the same machine serves both values of the key
// bit. x is read from its fixed location.
//
// Schedule (cycle after go = A0):
//   A0  read Xa, Zb           A1  mul0 <- Xa*Zb; read Xb, Za
//   A2  mul1 <- Xb*Za         A3  wait for both products, read x, then:
//   A4  Z3 = sq(mul0+mul1) written to Za; mul0 <- x*Z3; mul1 <- mul0*mul1
//   A5  wait for both products, then:
//   A6  Xa <- mul0 + mul1, done
// Steps A4 and A6 are carried out in the last cycle of the wait before
// them, the cycle in which the products become ready.
// Both multipliers run in parallel twice. With 4-cycle multiplications the
// addition takes 11 cycles from go to done. The order of operations is this
// design's choice; the formula and its cost follow the design.
module madd_fsm
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
  typedef enum logic [2:0] {IDLE, A0, A1, A2, A3, A5} state_e;
  state_e state, nxt;

  wire both_ready = mul0_ready && mul1_ready;

  always_comb begin
    nxt  = state;
    ctrl = CTRL_IDLE;
    done = 1'b0;
    unique case (state)
      IDLE: if (go) nxt = A0;
      A0: begin
        ctrl.pa = rd_par(2'd0);          // Xa
        ctrl.pb = rd_par(2'd3);          // Zb
        nxt = A1;
      end
      A1: begin
        ctrl.m0 = mul_go(SRC_RDA, SRC_RDB);
        ctrl.pa = rd_par(2'd2);          // Xb
        ctrl.pb = rd_par(2'd1);          // Za
        nxt = A2;
      end
      A2: begin
        ctrl.m1 = mul_go(SRC_RDA, SRC_RDB);
        nxt = A3;
      end
      A3: begin                          // wait, then step A4
        ctrl.pb = rd_dir(A_X);
        if (both_ready) begin
          ctrl.add0_a   = SRC_MUL0;
          ctrl.add0_b   = SRC_MUL1;
          ctrl.sqr0_src = SRC_ADD0;      // Z3
          ctrl.pa       = wr_par(2'd1, SRC_SQR0);
          ctrl.m0       = mul_go(SRC_SQR0, SRC_RDB);
          ctrl.m1       = mul_go(SRC_MUL0, SRC_MUL1);
          nxt = A5;
        end
      end
      A5: if (both_ready) begin          // wait, then step A6
        ctrl.add1_a = SRC_MUL0;
        ctrl.add1_b = SRC_MUL1;
        ctrl.pa     = wr_par(2'd0, SRC_ADD1);
        done = 1'b1;
        nxt  = IDLE;
      end
      default: nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= IDLE;
    else        state <= nxt;

  assign active = (state != IDLE);
endmodule
