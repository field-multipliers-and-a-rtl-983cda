// conv_fsm: final step of the point multiplication - recovery of the affine
// result (x3, y3) = mP from the two ladder points.
//
// After the ladder, P1 = (X1 : Z1) = mP and P2 = (X2 : Z2) = (m+1)P, and the
// base point P = (x, y) is known. With one field inversion this machine
// computes
//     inv = (x*Z1*Z2)^-1
//     x3  = X1 * (x*Z2) * inv                              (= X1/Z1)
//     y3  = (x + x3) * [(X1 + x*Z1)(X2 + x*Z2) + (x^2 + y)*Z1*Z2] * inv + y
// and writes x3 and y3 to their result locations. Several products here are
// independent, so both multipliers are kept busy where the order allows.
//
// Inversion uses Fermat's little theorem, a^-1 = a^(2^N - 2), as the product
// of a^(2^i) for i = 1 .. N-1: the squaring register steps through the
// powers a^(2^i) with one squarer while multiplier 0 accumulates their
// product, one multiplication per power (N-2 multiplications in all).
//
// Special cases: Z1 = 0 means mP is the point at infinity; the result
// locations are cleared and inf is set. Z2 = 0 means (m+1)P is infinity, so
// mP = -P = (x, x + y), which is written directly.
//
// Timing: about 30 cycles plus (N-3) * 4 cycles of inversion, roughly 790
// cycles for N = 191 with 4-cycle multiplications. done pulses in the last
// cycle; inf is valid from then until the next go.
module conv_fsm
  import ecc_pkg::*;
#(
  parameter int unsigned N = FIELD_N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  go,
  input  logic  mul0_ready,
  input  logic  mul1_ready,
  input  logic  rda_zero,
  output ctrl_t ctrl,
  output logic  active,
  output logic  done,
  output logic  inf
);
  typedef enum logic [4:0] {
    IDLE, C0, C1, CINF, C2, C3, C4, C5, C6, C7, C8, CN0, CN1, C9, C10, C11,
    INV_INIT, INV_LOOP, E0, E1, E2, E3, E4, E5, E6, E7
  } state_e;
  state_e state, nxt;

  localparam int unsigned CW = $clog2(N);
  logic [CW-1:0] cnt;
  logic          cnt_load, cnt_dec, inf_set, inf_clr;

  wire both_ready = mul0_ready && mul1_ready;

  always_comb begin
    nxt      = state;
    ctrl     = CTRL_IDLE;
    done     = 1'b0;
    cnt_load = 1'b0;
    cnt_dec  = 1'b0;
    inf_set  = 1'b0;
    inf_clr  = 1'b0;
    unique case (state)
      IDLE: if (go) nxt = C0;
      C0: begin ctrl.pa = rd_dir(A_Z1); nxt = C1; end
      C1: begin
        inf_clr = 1'b1;
        nxt = rda_zero ? CINF : C2;
      end
      CINF: begin                                   // mP = infinity
        ctrl.pa = wr_dir(A_RX, SRC_ZERO);
        ctrl.pb = wr_dir(A_RY, SRC_ZERO);
        inf_set = 1'b1;
        done    = 1'b1;
        nxt     = IDLE;
      end
      C2: begin ctrl.pa = rd_dir(A_X); ctrl.pb = rd_dir(A_Z1); nxt = C3; end
      C3: begin
        ctrl.m0 = mul_go(SRC_RDA, SRC_RDB);         // x*Z1
        ctrl.pb = rd_dir(A_Z2);
        nxt = C4;
      end
      C4: begin
        ctrl.m1 = mul_go(SRC_RDA, SRC_RDB);         // x*Z2
        ctrl.pa = rd_dir(A_X1);
        ctrl.pb = rd_dir(A_X2);
        nxt = C5;
      end
      C5: begin
        ctrl.pa = rd_dir(A_X1);
        ctrl.pb = rd_dir(A_X2);
        if (both_ready) nxt = C6;
      end
      C6: begin
        ctrl.add0_a = SRC_RDA;  ctrl.add0_b = SRC_MUL0;   // X1 + x*Z1
        ctrl.add1_a = SRC_RDB;  ctrl.add1_b = SRC_MUL1;   // X2 + x*Z2
        ctrl.m1 = mul_go(SRC_ADD0, SRC_ADD1);             // W
        ctrl.pa = wr_dir(A_T1, SRC_MUL1);                 // keep x*Z2
        ctrl.pb = rd_dir(A_Z1);
        nxt = C7;
      end
      C7: begin ctrl.pa = rd_dir(A_Z2); nxt = C8; end
      C8: begin
        if (rda_zero) begin
          nxt = CN0;                                      // (m+1)P = infinity
        end else begin
          ctrl.m0 = mul_go(SRC_RDA, SRC_RDB);             // V = Z1*Z2
          ctrl.pa = rd_dir(A_X);
          ctrl.pb = rd_dir(A_Y);
          nxt = C9;
        end
      end
      CN0: begin
        ctrl.pa = rd_dir(A_X);
        ctrl.pb = rd_dir(A_Y);
        if (both_ready) nxt = CN1;
      end
      CN1: begin                                          // mP = -P
        ctrl.add0_a = SRC_RDA; ctrl.add0_b = SRC_RDB;
        ctrl.pa = wr_dir(A_RX, SRC_RDA);
        ctrl.pb = wr_dir(A_RY, SRC_ADD0);
        done = 1'b1;
        nxt  = IDLE;
      end
      C9: begin
        ctrl.pa = rd_dir(A_X);
        ctrl.pb = rd_dir(A_Y);
        if (both_ready) nxt = C10;
      end
      C10: begin
        ctrl.m0 = mul_go(SRC_RDA, SRC_MUL0);              // T = x*V
        ctrl.sqr0_src = SRC_RDA;                          // x^2
        ctrl.add1_a = SRC_SQR0; ctrl.add1_b = SRC_RDB;    // x^2 + y
        ctrl.m1 = mul_go(SRC_ADD1, SRC_MUL0);             // (x^2+y)*V
        ctrl.pa = wr_dir(A_T2, SRC_MUL1);                 // keep W
        nxt = C11;
      end
      C11: begin
        ctrl.pa = rd_dir(A_T2);
        if (both_ready) nxt = INV_INIT;
      end
      INV_INIT: begin
        ctrl.add0_a = SRC_RDA; ctrl.add0_b = SRC_MUL1;    // numerator
        ctrl.pa = wr_dir(A_T2, SRC_ADD0);
        ctrl.sqr0_src = SRC_MUL0;                         // T^2
        ctrl.sqr1_src = SRC_SQR0;                         // T^4
        ctrl.m0 = mul_go(SRC_SQR0, SRC_SQR1);
        ctrl.sq_ld = 1'b1; ctrl.sq_src = SRC_SQR1;
        cnt_load = 1'b1;
        nxt = INV_LOOP;
      end
      INV_LOOP: begin
        if (mul0_ready) begin
          if (cnt != '0) begin
            ctrl.sqr0_src = SRC_SQREG;                    // next power
            ctrl.m0 = mul_go(SRC_MUL0, SRC_SQR0);
            ctrl.sq_ld = 1'b1; ctrl.sq_src = SRC_SQR0;
            cnt_dec = 1'b1;
          end else begin
            nxt = E0;                                     // mul0 = T^-1
          end
        end
      end
      E0: begin ctrl.pa = rd_dir(A_T1); ctrl.pb = rd_dir(A_T2); nxt = E1; end
      E1: begin
        ctrl.m1 = mul_go(SRC_RDA, SRC_MUL0);              // x*Z2 * inv
        ctrl.m0 = mul_go(SRC_RDB, SRC_MUL0);              // num * inv
        ctrl.pa = rd_dir(A_X1);
        nxt = E2;
      end
      E2: begin
        ctrl.pa = rd_dir(A_X1);
        ctrl.pb = rd_dir(A_X);
        if (both_ready) nxt = E3;
      end
      E3: begin
        ctrl.m1 = mul_go(SRC_RDA, SRC_MUL1);              // x3
        ctrl.m0.la = 1'b1; ctrl.m0.asrc = SRC_MUL0;       // hold num*inv
        nxt = E4;
      end
      E4: if (mul1_ready) nxt = E5;
      E5: begin
        ctrl.pa = wr_dir(A_RX, SRC_MUL1);
        ctrl.add0_a = SRC_RDB; ctrl.add0_b = SRC_MUL1;    // x + x3
        ctrl.m0.start = 1'b1; ctrl.m0.lb = 1'b1; ctrl.m0.bsrc = SRC_ADD0;
        ctrl.pb = rd_dir(A_Y);
        nxt = E6;
      end
      E6: if (mul0_ready) nxt = E7;
      E7: begin
        ctrl.add0_a = SRC_MUL0; ctrl.add0_b = SRC_RDB;
        ctrl.pa = wr_dir(A_RY, SRC_ADD0);
        done = 1'b1;
        nxt  = IDLE;
      end
      default: nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      inf   <= 1'b0;
    end else begin
      state <= nxt;
      if (cnt_load)     cnt <= CW'(N - 3);
      else if (cnt_dec) cnt <= cnt - 1'b1;
      if (inf_set)      inf <= 1'b1;
      else if (inf_clr) inf <= 1'b0;
    end
  end

  assign active = (state != IDLE);
endmodule
